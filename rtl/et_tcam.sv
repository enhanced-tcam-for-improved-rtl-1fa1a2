// et_tcam: error-tolerant Parity TCAM.
//
// A Parity TCAM of W words of N ternary digits, protected against soft
// errors (including several flipped bits in one word) by a backup copy in an
// ECC-SRAM and a test mode that searches the TCAM with pre-computed
// partial don't-care keys (X-keys). The parts and their connections:
//
//   key_mux       picks the word applied to the TCAM: search key, X-key or
//                 backup data (2-bit select from the controller)
//   parity_tcam   the CAM array; its lowest match address and its
//                 multiple-match "refresh bit" go to the output and back to
//                 the controller
//   ecc_sram      backup copy of each word, addressed by the controller
//   xkey_lut      X look-up memory holding the X-keys and their expected
//                 match index
//   et_controller sequences regular searches, host writes, X-key tests and
//                 repairs
//
// Interface: host writes (wr_*) are taken while wr_ready; searches (s_*)
// while s_ready, which is only in regular mode. A search result (r_addr,
// r_hit, r_multi) is valid with r_valid one cycle after the search. X-keys
// are loaded through the x_* port. Setting mode to MODE_TEST starts
// scrubbing passes. The inj_* ports flip stored bits in the TCAM or the
// ECC-SRAM to model soft errors in test benches; tie them off otherwise.
module et_tcam
  import tcam_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned W     = 4,
  parameter int unsigned NX    = 8,
  parameter int unsigned CNT_W = 16,
  localparam int unsigned AW  = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned XW  = (NX > 1) ? $clog2(NX) : 1,
  localparam int unsigned DW  = 2 * N,
  localparam int unsigned ECW = secded_cw(2 * N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  // host write of one TCAM word
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [N-1:0]     wr_val,
  input  logic [N-1:0]     wr_care,
  output logic             wr_ready,
  // search
  input  logic             s_valid,
  input  logic [N-1:0]     s_val,
  input  logic [N-1:0]     s_care,
  output logic             s_ready,
  output logic             r_valid,
  output logic [AW-1:0]    r_addr,
  output logic             r_hit,
  output logic             r_multi,
  // X-key loading
  input  logic             x_we,
  input  logic [XW-1:0]    x_widx,
  input  logic [N-1:0]     x_wval,
  input  logic [N-1:0]     x_wcare,
  input  logic [AW-1:0]    x_wexp_addr,
  input  logic             x_wexp_hit,
  input  logic             x_wvalid,
  // status
  output logic             test_busy,
  output logic             pass_done,
  output logic [CNT_W-1:0] err_cnt,
  output logic [CNT_W-1:0] fix_cnt,
  output logic [CNT_W-1:0] fail_cnt,
  output logic [CNT_W-1:0] unc_cnt,
  output logic [CNT_W-1:0] pass_cnt,
  output logic             sram_corrected,
  // soft-error injection
  input  logic             tinj_en,
  input  logic [AW-1:0]    tinj_addr,
  input  logic [N:0]       tinj_flip_val,
  input  logic [N:0]       tinj_flip_care,
  input  logic             sinj_en,
  input  logic [AW-1:0]    sinj_addr,
  input  logic [ECW-1:0]   sinj_flip
);

  key_sel_e      sel;
  logic [N-1:0]  mux_val, mux_care, x_val, x_care;
  logic          t_search, t_we, t_rvalid, t_hit, t_multi;
  logic [W-1:0]  t_row_en, t_ml;
  logic [AW-1:0] t_waddr, t_addr;
  logic          sr_we, sr_re, sr_rvalid, sr_unc;
  logic [AW-1:0] sr_waddr, sr_raddr;
  logic [DW-1:0] sr_rdata;
  logic [XW-1:0] xidx;
  logic [AW-1:0] x_exp_addr;
  logic          x_exp_hit, x_valid;

  key_mux #(.N(N)) u_mux (
    .sel         (sel),
    .search_val  (s_val),
    .search_care (s_care),
    .xkey_val    (x_val),
    .xkey_care   (x_care),
    .data_val    (sr_rdata[N-1:0]),
    .data_care   (sr_rdata[DW-1:N]),
    .out_val     (mux_val),
    .out_care    (mux_care)
  );

  parity_tcam #(.N(N), .W(W)) u_tcam (
    .clk           (clk),
    .rst_n         (rst_n),
    .we            (t_we),
    .waddr         (t_waddr),
    .wval          (mux_val),
    .wcare         (mux_care),
    .search        (t_search),
    .sval          (mux_val),
    .scare         (mux_care),
    .row_en        (t_row_en),
    .rvalid        (t_rvalid),
    .ml            (t_ml),
    .addr          (t_addr),
    .hit           (t_hit),
    .multi         (t_multi),
    .inj_en        (tinj_en),
    .inj_addr      (tinj_addr),
    .inj_flip_val  (tinj_flip_val),
    .inj_flip_care (tinj_flip_care)
  );

  ecc_sram #(.DW(DW), .W(W)) u_sram (
    .clk           (clk),
    .rst_n         (rst_n),
    .we            (sr_we),
    .waddr         (sr_waddr),
    .wdata         ({wr_care, wr_val}),
    .re            (sr_re),
    .raddr         (sr_raddr),
    .rvalid        (sr_rvalid),
    .rdata         (sr_rdata),
    .corrected     (sram_corrected),
    .uncorrectable (sr_unc),
    .inj_en        (sinj_en),
    .inj_addr      (sinj_addr),
    .inj_flip      (sinj_flip)
  );

  xkey_lut #(.N(N), .W(W), .NX(NX)) u_xlut (
    .clk       (clk),
    .rst_n     (rst_n),
    .we        (x_we),
    .widx      (x_widx),
    .wval      (x_wval),
    .wcare     (x_wcare),
    .wexp_addr (x_wexp_addr),
    .wexp_hit  (x_wexp_hit),
    .wvalid    (x_wvalid),
    .idx       (xidx),
    .xval      (x_val),
    .xcare     (x_care),
    .exp_addr  (x_exp_addr),
    .exp_hit   (x_exp_hit),
    .valid     (x_valid)
  );

  et_controller #(.W(W), .NX(NX), .CNT_W(CNT_W)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .mode        (mode),
    .wr_en       (wr_en),
    .wr_addr     (wr_addr),
    .wr_ready    (wr_ready),
    .s_valid     (s_valid),
    .s_ready     (s_ready),
    .r_valid     (r_valid),
    .sel         (sel),
    .tcam_search (t_search),
    .tcam_row_en (t_row_en),
    .tcam_we     (t_we),
    .tcam_waddr  (t_waddr),
    .tcam_rvalid (t_rvalid),
    .tcam_addr   (t_addr),
    .tcam_hit    (t_hit),
    .tcam_multi  (t_multi),
    .sram_we     (sr_we),
    .sram_waddr  (sr_waddr),
    .sram_re     (sr_re),
    .sram_raddr  (sr_raddr),
    .sram_unc    (sr_unc),
    .xidx        (xidx),
    .x_valid     (x_valid),
    .x_exp_addr  (x_exp_addr),
    .x_exp_hit   (x_exp_hit),
    .test_busy   (test_busy),
    .pass_done   (pass_done),
    .err_cnt     (err_cnt),
    .fix_cnt     (fix_cnt),
    .fail_cnt    (fail_cnt),
    .unc_cnt     (unc_cnt),
    .pass_cnt    (pass_cnt)
  );

  // the rewrite path only writes a backup word read in the previous cycle
  property p_write_from_backup;
    @(posedge clk) disable iff (!rst_n) t_we |-> sr_rvalid;
  endproperty
  assert property (p_write_from_backup);

  assign r_addr  = t_addr;
  assign r_hit   = t_hit;
  assign r_multi = t_multi;

endmodule
