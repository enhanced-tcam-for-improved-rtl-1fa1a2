// atm_tcam_top: ATM VPI/VCI translator built on the error-tolerant Parity
// TCAM.
//
// Incoming ATM cell headers are translated by atm_translator, whose
// connection table is an et_tcam (Parity TCAM with X-key testing and
// ECC-SRAM backup) of W entries of ATM_KEY_W = 28 ternary digits, and whose
// outgoing VPI/VCI values sit in xlate_ram. Soft errors in the connection
// table, up to several flipped bits per word, are found and repaired by
// test passes while mode is MODE_TEST; cells wait (in_ready low) during a
// pass and are translated in MODE_REGULAR.
//
// Configuration: a connection is written with cfg_wr_en while cfg_ready:
// the CAM entry (cfg_key_val / cfg_key_care, {VPI 12, VCI 16}) goes to the
// ECC-SRAM and, two cycles later, into the TCAM; the outgoing VPI/VCI goes
// to the translation RAM in the same cycle. X-keys for the test pass are
// loaded through x_*. The inj_* ports flip stored bits to model soft errors
// and are for test only.
//
// Timing: a translated header appears 3 cycles after it is accepted (see
// atm_translator). The table size W and X-key count NX are this design's
// choices.
module atm_tcam_top
  import tcam_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned NX    = 16,
  parameter int unsigned CNT_W = 16,
  localparam int unsigned N    = ATM_KEY_W,
  localparam int unsigned AW   = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned XW   = (NX > 1) ? $clog2(NX) : 1,
  localparam int unsigned ECW  = secded_cw(2 * N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mode_e                mode,
  input  logic                 nni,
  // cells
  input  logic                 in_valid,
  input  logic [ATM_HDR_W-1:0] in_hdr,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic [ATM_HDR_W-1:0] out_hdr,
  output logic                 out_hit,
  output logic                 out_hec_err,
  // connection table configuration
  input  logic                 cfg_wr_en,
  input  logic [AW-1:0]        cfg_addr,
  input  logic [N-1:0]         cfg_key_val,
  input  logic [N-1:0]         cfg_key_care,
  input  logic [ATM_VPI_W-1:0] cfg_new_vpi,
  input  logic [ATM_VCI_W-1:0] cfg_new_vci,
  output logic                 cfg_ready,
  // X-key loading
  input  logic                 x_we,
  input  logic [XW-1:0]        x_widx,
  input  logic [N-1:0]         x_wval,
  input  logic [N-1:0]         x_wcare,
  input  logic [AW-1:0]        x_wexp_addr,
  input  logic                 x_wexp_hit,
  input  logic                 x_wvalid,
  // status
  output logic                 test_busy,
  output logic                 pass_done,
  output logic [CNT_W-1:0]     err_cnt,
  output logic [CNT_W-1:0]     fix_cnt,
  output logic [CNT_W-1:0]     fail_cnt,
  output logic [CNT_W-1:0]     unc_cnt,
  output logic [CNT_W-1:0]     pass_cnt,
  output logic                 sram_corrected,
  output logic                 multi_match,
  // soft-error injection
  input  logic                 tinj_en,
  input  logic [AW-1:0]        tinj_addr,
  input  logic [N:0]           tinj_flip_val,
  input  logic [N:0]           tinj_flip_care,
  input  logic                 sinj_en,
  input  logic [AW-1:0]        sinj_addr,
  input  logic [ECW-1:0]       sinj_flip
);

  logic          cam_s_valid, cam_s_ready, cam_r_valid, cam_r_hit, cam_r_multi;
  logic [N-1:0]  cam_key;
  logic [AW-1:0] cam_r_addr;
  logic          ram_re;
  logic [AW-1:0] ram_raddr;
  logic [N-1:0]  ram_rdata;
  logic          cfg_fire;

  assign cfg_fire    = cfg_wr_en && cfg_ready;
  assign multi_match = cam_r_valid && cam_r_multi;

  atm_translator #(.W(W)) u_xlate (
    .clk         (clk),
    .rst_n       (rst_n),
    .nni         (nni),
    .in_valid    (in_valid),
    .in_hdr      (in_hdr),
    .in_ready    (in_ready),
    .cam_s_valid (cam_s_valid),
    .cam_key     (cam_key),
    .cam_s_ready (cam_s_ready),
    .cam_r_valid (cam_r_valid),
    .cam_r_addr  (cam_r_addr),
    .cam_r_hit   (cam_r_hit),
    .ram_re      (ram_re),
    .ram_raddr   (ram_raddr),
    .ram_rdata   (ram_rdata),
    .out_valid   (out_valid),
    .out_hdr     (out_hdr),
    .out_hit     (out_hit),
    .out_hec_err (out_hec_err)
  );

  et_tcam #(.N(N), .W(W), .NX(NX), .CNT_W(CNT_W)) u_cam (
    .clk            (clk),
    .rst_n          (rst_n),
    .mode           (mode),
    .wr_en          (cfg_fire),
    .wr_addr        (cfg_addr),
    .wr_val         (cfg_key_val),
    .wr_care        (cfg_key_care),
    .wr_ready       (cfg_ready),
    .s_valid        (cam_s_valid),
    .s_val          (cam_key),
    .s_care         ('1),
    .s_ready        (cam_s_ready),
    .r_valid        (cam_r_valid),
    .r_addr         (cam_r_addr),
    .r_hit          (cam_r_hit),
    .r_multi        (cam_r_multi),
    .x_we           (x_we),
    .x_widx         (x_widx),
    .x_wval         (x_wval),
    .x_wcare        (x_wcare),
    .x_wexp_addr    (x_wexp_addr),
    .x_wexp_hit     (x_wexp_hit),
    .x_wvalid       (x_wvalid),
    .test_busy      (test_busy),
    .pass_done      (pass_done),
    .err_cnt        (err_cnt),
    .fix_cnt        (fix_cnt),
    .fail_cnt       (fail_cnt),
    .unc_cnt        (unc_cnt),
    .pass_cnt       (pass_cnt),
    .sram_corrected (sram_corrected),
    .tinj_en        (tinj_en),
    .tinj_addr      (tinj_addr),
    .tinj_flip_val  (tinj_flip_val),
    .tinj_flip_care (tinj_flip_care),
    .sinj_en        (sinj_en),
    .sinj_addr      (sinj_addr),
    .sinj_flip      (sinj_flip)
  );

  xlate_ram #(.W(W)) u_ram (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (cfg_fire),
    .waddr  (cfg_addr),
    .wdata  ({cfg_new_vpi, cfg_new_vci}),
    .re     (ram_re),
    .raddr  (ram_raddr),
    .rvalid (),
    .rdata  (ram_rdata)
  );

endmodule
