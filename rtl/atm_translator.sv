// atm_translator: VPI/VCI translation of ATM cell headers with a CAM and a
// RAM.
//
// At each switch hop the virtual path and channel identifiers of a cell
// must be replaced by those of the next connection segment. The incoming
// VPI/VCI is searched in a CAM holding all active connections; the match
// address selects a RAM entry with the outgoing VPI/VCI; the header is
// rebuilt with them and a fresh HEC.
//
// Header format: nni selects the NNI layout (12-bit VPI) instead of the UNI
// layout (4-bit GFC, 8-bit VPI); GFC, PT and CLP pass through unchanged.
// The CAM key is {VPI (12 bits, UNI zero-extended), VCI (16 bits)}, searched
// with every digit cared for; stored entries may hold don't-care digits, so
// a whole virtual path can be switched with one entry whose VCI is X.
//
// Pipeline (one cell per cycle while in_ready):
//   cycle 0  HEC of the incoming header checked; CAM search issued
//   cycle 1  CAM result; RAM read at the match address
//   cycle 2  header rebuilt, new HEC computed, registered
//   cycle 3  out_valid with out_hdr, out_hit, out_hec_err
// A cell whose HEC is wrong is not searched and comes out unchanged with
// out_hec_err; a cell whose VPI/VCI is not in the CAM comes out unchanged
// with out_hit low (the switch drops it). in_ready follows the CAM's
// search-ready, so cells wait while the CAM is being written or tested.
// What follows the design: CAM lookup, RAM holding the mapping, header
// rewrite and the HEC polynomial. The pipeline, the handling of bad-HEC and
// unknown cells and the key layout are this design's choices.
module atm_translator
  import tcam_pkg::*;
#(
  parameter int unsigned W  = 16,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    nni,
  // incoming cells
  input  logic                    in_valid,
  input  logic [ATM_HDR_W-1:0]    in_hdr,
  output logic                    in_ready,
  // CAM search port
  output logic                    cam_s_valid,
  output logic [ATM_KEY_W-1:0]    cam_key,
  input  logic                    cam_s_ready,
  input  logic                    cam_r_valid,
  input  logic [AW-1:0]           cam_r_addr,
  input  logic                    cam_r_hit,
  // translation RAM read port
  output logic                    ram_re,
  output logic [AW-1:0]           ram_raddr,
  input  logic [ATM_KEY_W-1:0]    ram_rdata,
  // translated cells
  output logic                    out_valid,
  output logic [ATM_HDR_W-1:0]    out_hdr,
  output logic                    out_hit,
  output logic                    out_hec_err
);

  atm_hdr_t in_f;
  logic     in_hec_ok;
  logic [7:0] in_hec_calc;

  assign in_f = atm_parse(in_hdr, nni);

  hec_crc8 u_hec_in (
    .hdr    (in_hdr[39:8]),
    .hec_in (in_hdr[7:0]),
    .hec    (in_hec_calc),
    .ok     (in_hec_ok)
  );

  assign in_ready    = cam_s_ready;
  assign cam_s_valid = in_valid && in_hec_ok;
  assign cam_key     = {in_f.vpi, in_f.vci};

  // stage 1: waiting for the CAM result
  logic                 v1, hecok1;
  logic [ATM_HDR_W-1:0] hdr1;
  // stage 2: waiting for the RAM data
  logic                 v2, hecok2, hit2;
  logic [ATM_HDR_W-1:0] hdr2;

  assign ram_re    = v1 && hecok1 && cam_r_valid && cam_r_hit;
  assign ram_raddr = cam_r_addr;

  // header rebuild
  atm_hdr_t   f2, new_f;
  logic [7:0] new_hec;
  logic [ATM_HDR_W-1:0] new_pre, new_hdr;

  always_comb begin
    f2        = atm_parse(hdr2, nni);
    new_f     = f2;
    new_f.vpi = ram_rdata[ATM_KEY_W-1:ATM_VCI_W];
    new_f.vci = ram_rdata[ATM_VCI_W-1:0];
    new_f.hec = 8'h00;
    new_pre   = atm_pack(new_f, nni);
  end

  hec_crc8 u_hec_out (
    .hdr    (new_pre[39:8]),
    .hec_in (8'h00),
    .hec    (new_hec),
    .ok     ()
  );

  always_comb begin
    new_hdr = {new_pre[39:8], new_hec};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; hecok1 <= 1'b0; hdr1 <= '0;
      v2 <= 1'b0; hecok2 <= 1'b0; hit2 <= 1'b0; hdr2 <= '0;
      out_valid <= 1'b0; out_hdr <= '0; out_hit <= 1'b0; out_hec_err <= 1'b0;
    end else begin
      v1     <= in_valid && in_ready;
      hecok1 <= in_hec_ok;
      hdr1   <= in_hdr;
      v2     <= v1;
      hecok2 <= hecok1;
      hit2   <= hecok1 && cam_r_valid && cam_r_hit;
      hdr2   <= hdr1;
      out_valid   <= v2;
      out_hit     <= hit2;
      out_hec_err <= v2 && !hecok2;
      out_hdr     <= hit2 ? new_hdr : hdr2;
    end
  end

  // every searched cell gets its CAM answer in the next cycle
  property p_cam_answers;
    @(posedge clk) disable iff (!rst_n) (v1 && hecok1) |-> cam_r_valid;
  endproperty
  assert property (p_cam_answers);

endmodule
