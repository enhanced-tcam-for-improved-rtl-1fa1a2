// parity_tcam: ternary CAM array with one parity digit per word.
//
// W words of N ternary data digits. When a word is written, one more digit
// is appended to it: the even parity (XOR) of its data bits. A search key
// gets the same parity digit, so a stored word that differs from the key in
// exactly one data bit also differs in the parity digit and shows two
// mismatches instead of one; in a matchline circuit that doubles the
// pull-down current of the worst-case (one-mismatch) word. Logically the
// match result is the same as without parity: every digit, parity
// included, must agree unless the stored or the searched digit is don't
// care. Where a word or key holds any don't-care data digit its parity is
// unknown, so the parity digit is then stored or searched as don't care
// (this handling of X is this design's choice).
//
// Search: all W words are compared in parallel with the applied key; the
// matchline vector is registered, so ml/addr/hit/multi are valid in the
// cycle after search was high (rvalid). Rows whose row_en bit is low never
// match. addr is the lowest matching word (see match_encoder), multi flags
// more than one match.
//
// Write: when we is high the word at waddr is replaced at the clock edge;
// a search in the same cycle sees the old contents.
//
// Soft-error injection (test only): when inj_en is high the stored bits of
// word inj_addr are XORed with inj_flip_val / inj_flip_care (N+1 digits,
// parity digit in the top bit). This models radiation-induced bit flips.
//
// Reset clears all words to 0 (all digits care, value 0) and the outputs.
module parity_tcam #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 4,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wval,
  input  logic [N-1:0]  wcare,
  // search port
  input  logic          search,
  input  logic [N-1:0]  sval,
  input  logic [N-1:0]  scare,
  input  logic [W-1:0]  row_en,
  // result, one cycle after search
  output logic          rvalid,
  output logic [W-1:0]  ml,
  output logic [AW-1:0] addr,
  output logic          hit,
  output logic          multi,
  // soft-error injection
  input  logic          inj_en,
  input  logic [AW-1:0] inj_addr,
  input  logic [N:0]    inj_flip_val,
  input  logic [N:0]    inj_flip_care
);

  logic [N:0] mem_val  [W];
  logic [N:0] mem_care [W];

  // parity digit of the written word and of the search key
  logic w_par, w_par_care, s_par, s_par_care;
  assign w_par      = ^wval;
  assign w_par_care = &wcare;
  assign s_par      = ^sval;
  assign s_par_care = &scare;

  logic [N:0] key_val, key_care;
  assign key_val  = {s_par, sval};
  assign key_care = {s_par_care, scare};

  // matchlines: a digit mismatches only when both sides care and differ
  logic [W-1:0] ml_d;
  always_comb begin
    for (int i = 0; i < W; i++)
      ml_d[i] = row_en[i] && ((mem_care[i] & key_care & (mem_val[i] ^ key_val)) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) begin
        mem_val[i]  <= '0;
        mem_care[i] <= '1;
      end
    end else begin
      if (we) begin
        mem_val[waddr]  <= {w_par, wval};
        mem_care[waddr] <= {w_par_care, wcare};
      end
      if (inj_en && !(we && waddr == inj_addr)) begin
        mem_val[inj_addr]  <= mem_val[inj_addr]  ^ inj_flip_val;
        mem_care[inj_addr] <= mem_care[inj_addr] ^ inj_flip_care;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      ml     <= '0;
    end else begin
      rvalid <= search;
      if (search) ml <= ml_d;
    end
  end

  match_encoder #(.W(W)) u_enc (
    .ml    (ml),
    .addr  (addr),
    .hit   (hit),
    .multi (multi)
  );

endmodule
