// xlate_ram: VPI/VCI translation memory of the ATM switch port.
//
// One entry per connection, indexed by the address the CAM returns for the
// incoming VPI/VCI. An entry holds the outgoing VPI (12 bits; a UNI header
// uses its 8 LSBs) and the outgoing VCI (16 bits). The CAM-plus-RAM split
// follows the design; holding exactly these two fields is this design's
// choice.
//
// Timing: synchronous write (we); synchronous read, rdata valid with rvalid
// one cycle after re. Reset clears all entries.
module xlate_ram
  import tcam_pkg::*;
#(
  parameter int unsigned W  = 16,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned DW = ATM_VPI_W + ATM_VCI_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rvalid,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) mem[i] <= '0;
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (we) mem[waddr] <= wdata;
      rvalid <= re;
      if (re) rdata <= mem[raddr];
    end
  end

endmodule
