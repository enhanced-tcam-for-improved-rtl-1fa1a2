// xkey_lut: the X look-up memory of the error-tolerant TCAM.
//
// Holds NX pre-processed X-keys: search keys in which some digits are
// don't care, chosen so that on a fault-free TCAM each X-key matches a known
// set of words. Each entry stores the key (value and care vectors, N
// digits), the index of the single TCAM word it is expected to match
// (exp_addr), whether it is expected to match at all (exp_hit), and a valid
// bit. The controller steps through the entries in test mode and compares
// what the TCAM returns with the expectation; any difference, or a match in
// more than one place, means a soft error. The expectation fields and the
// host write port are this design's choices: the keys are computed off-line
// from the rule table and loaded with it.
//
// Timing: a write (we) takes effect at the clock edge; the read port (idx)
// is asynchronous. Reset clears all valid bits.
module xkey_lut #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 4,
  parameter int unsigned NX = 8,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned XW = (NX > 1) ? $clog2(NX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [XW-1:0] widx,
  input  logic [N-1:0]  wval,
  input  logic [N-1:0]  wcare,
  input  logic [AW-1:0] wexp_addr,
  input  logic          wexp_hit,
  input  logic          wvalid,
  input  logic [XW-1:0] idx,
  output logic [N-1:0]  xval,
  output logic [N-1:0]  xcare,
  output logic [AW-1:0] exp_addr,
  output logic          exp_hit,
  output logic          valid
);

  typedef struct packed {
    logic [N-1:0]  val;
    logic [N-1:0]  care;
    logic [AW-1:0] exp_addr;
    logic          exp_hit;
  } xentry_t;

  xentry_t    mem [NX];
  logic [NX-1:0] vld;

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= '{val: wval, care: wcare, exp_addr: wexp_addr, exp_hit: wexp_hit};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vld <= '0;
    else if (we) vld[widx] <= wvalid;
  end

  assign xval     = mem[idx].val;
  assign xcare    = mem[idx].care;
  assign exp_addr = mem[idx].exp_addr;
  assign exp_hit  = mem[idx].exp_hit;
  assign valid    = vld[idx];

endmodule
