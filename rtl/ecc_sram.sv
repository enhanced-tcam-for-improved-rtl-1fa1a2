// ecc_sram: backup memory with single-error-correcting, double-error-
// detecting (SECDED) Hamming code.
//
// Holds a second copy of every TCAM word so that a word found corrupted in
// the TCAM can be rewritten from a good copy. Each DW-bit data word is
// stored as a CW-bit codeword: data bits at the non-power-of-two positions
// 1..DW+R of a Hamming code, check bits at positions 1, 2, 4, ..., and an
// overall parity bit at position 0. On a read the syndrome is computed;
// a single flipped bit (data or check) is corrected and reported on
// corrected, two flipped bits are reported on uncorrectable. A corrected
// read also writes the repaired codeword back into the memory, so faults in
// the backup are repaired as they are found, as the design asks for in test
// mode. That the backup memory carries an ECC and is repaired follows the
// design; the SECDED Hamming code and repair-on-read are this design's own
// choices.
//
// Timing: a write (we) takes effect at the clock edge. A read (re) returns
// rdata, corrected and uncorrectable in the next cycle, with rvalid high;
// the write-back of a corrected word happens at the same edge.
// Soft-error injection (test only): inj_en XORs inj_flip into the stored
// codeword at inj_addr. Reset stores the codeword of an all-zero word in
// every location.
module ecc_sram
  import tcam_pkg::*;
#(
  parameter int unsigned DW = 8,
  parameter int unsigned W  = 4,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned R  = secded_r(DW),
  localparam int unsigned CW = DW + R + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rvalid,
  output logic [DW-1:0] rdata,
  output logic          corrected,
  output logic          uncorrectable,
  input  logic          inj_en,
  input  logic [AW-1:0] inj_addr,
  input  logic [CW-1:0] inj_flip
);

  function automatic logic [CW-1:0] encode(input logic [DW-1:0] d);
    logic [CW-1:0] c;
    int unsigned k;
    c = '0;
    k = 0;
    for (int unsigned pos = 1; pos < CW; pos++)
      if ((pos & (pos - 1)) != 0) begin
        c[pos] = d[k];
        k++;
      end
    for (int unsigned r = 0; r < R; r++) begin
      logic p;
      p = 1'b0;
      for (int unsigned pos = 1; pos < CW; pos++)
        if (((pos >> r) & 1) != 0) p ^= c[pos];
      c[1 << r] = p;
    end
    c[0] = ^c;
    return c;
  endfunction

  logic [CW-1:0] mem [W];

  // decode of the addressed word
  logic [CW-1:0] rd_code, fixed;
  logic [R-1:0]  syndrome;
  logic          overall;
  logic [DW-1:0] dec_data;
  logic          dec_corr, dec_unc;

  assign rd_code = mem[raddr];

  always_comb begin
    int unsigned k;
    syndrome = '0;
    for (int unsigned pos = 1; pos < CW; pos++)
      if (rd_code[pos]) syndrome ^= R'(pos);
    overall  = ^rd_code;
    fixed    = rd_code;
    dec_corr = 1'b0;
    dec_unc  = 1'b0;
    if (overall) begin
      // odd number of flips: assume one, at the syndrome position
      // (syndrome 0 means the overall parity bit itself flipped)
      dec_corr = 1'b1;
      if (32'(syndrome) < CW) fixed[syndrome] = ~rd_code[syndrome];
      else dec_unc = 1'b1;
    end else if (syndrome != '0) begin
      dec_unc = 1'b1;
    end
    dec_data = '0;
    k = 0;
    for (int unsigned pos = 1; pos < CW; pos++)
      if ((pos & (pos - 1)) != 0) begin
        dec_data[k] = fixed[pos];
        k++;
      end
  end

  // a corrected read writes the repaired codeword back (scrub), unless a
  // host write to the same word takes the cycle
  logic scrub;
  assign scrub = re && dec_corr && !dec_unc && !(we && waddr == raddr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) mem[i] <= encode('0);
    end else begin
      if (we) mem[waddr] <= encode(wdata);
      if (scrub) mem[raddr] <= encode(dec_data);
      if (inj_en && !(we && waddr == inj_addr) && !(scrub && raddr == inj_addr))
        mem[inj_addr] <= mem[inj_addr] ^ inj_flip;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid        <= 1'b0;
      rdata         <= '0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      rvalid <= re;
      if (re) begin
        rdata         <= dec_data;
        corrected     <= dec_corr && !dec_unc;
        uncorrectable <= dec_unc;
      end
    end
  end

endmodule
