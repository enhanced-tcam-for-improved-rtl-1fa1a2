// tb_parity_tcam: self-checking test of the Parity TCAM array.
//
// Three instances:
//  * u5: the 4-word, 5-digit route table of the classic CAM example
//    (101XX, 0110X, 011XX, 10011) searched with 01101: words 1 and 2 match,
//    the encoder returns 01 and flags a multiple match.
//  * u7: the 5-word, 7-bit parity-CAM example (0000000, 0100001, 0000001,
//    0000101, 0001111) searched with 0000101: only word 3 matches. The
//    stored parity digits are checked (0,0,1,0,0), and word 2, one data bit
//    away from the key, is checked to differ in the parity digit too.
//  * u4: default size, random ternary writes, searches, row enables and
//    bit-flip injections against a reference array kept in the testbench.
// The result is checked one cycle after each search (rvalid).
module tb_parity_tcam;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- helpers
  // ternary string (MSB first, '0' '1' 'X') to value/care
  function automatic logic [15:0] s2v(input string s);
    logic [15:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[s.len() - 1 - i] = (s[i] == "1");
    return v;
  endfunction
  function automatic logic [15:0] s2c(input string s);
    logic [15:0] c = '0;
    for (int i = 0; i < s.len(); i++) c[s.len() - 1 - i] = (s[i] != "X");
    return c;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------------------------------------------------------- u5
  logic       we5, se5, rv5, hit5, mu5;
  logic [1:0] wa5, ad5;
  logic [4:0] wv5, wc5, sv5, sc5;
  logic [3:0] ml5;
  parity_tcam #(.N(5), .W(4)) u5 (
    .clk(clk), .rst_n(rst_n), .we(we5), .waddr(wa5), .wval(wv5), .wcare(wc5),
    .search(se5), .sval(sv5), .scare(sc5), .row_en(4'hF),
    .rvalid(rv5), .ml(ml5), .addr(ad5), .hit(hit5), .multi(mu5),
    .inj_en(1'b0), .inj_addr(2'd0), .inj_flip_val('0), .inj_flip_care('0));

  // ---------------------------------------------------------------- u7
  logic       we7, se7, rv7, hit7, mu7;
  logic [2:0] wa7, ad7;
  logic [6:0] wv7, wc7, sv7, sc7;
  logic [4:0] ml7;
  parity_tcam #(.N(7), .W(5)) u7 (
    .clk(clk), .rst_n(rst_n), .we(we7), .waddr(wa7), .wval(wv7), .wcare(wc7),
    .search(se7), .sval(sv7), .scare(sc7), .row_en(5'h1F),
    .rvalid(rv7), .ml(ml7), .addr(ad7), .hit(hit7), .multi(mu7),
    .inj_en(1'b0), .inj_addr(3'd0), .inj_flip_val('0), .inj_flip_care('0));

  // ---------------------------------------------------------------- u4
  logic       we4, se4, rv4, hit4, mu4, ie4;
  logic [1:0] wa4, ad4, ia4;
  logic [3:0] wv4, wc4, sv4, sc4, re4, ml4;
  logic [4:0] ifv4, ifc4;
  parity_tcam u4 (
    .clk(clk), .rst_n(rst_n), .we(we4), .waddr(wa4), .wval(wv4), .wcare(wc4),
    .search(se4), .sval(sv4), .scare(sc4), .row_en(re4),
    .rvalid(rv4), .ml(ml4), .addr(ad4), .hit(hit4), .multi(mu4),
    .inj_en(ie4), .inj_addr(ia4), .inj_flip_val(ifv4), .inj_flip_care(ifc4));

  // reference of u4: value/care of N+1 digits per word
  logic [4:0] rv [4];
  logic [4:0] rc [4];

  string fig1 [4] = '{"101XX", "0110X", "011XX", "10011"};
  string fig3 [5] = '{"0000000", "0100001", "0000001", "0000101", "0001111"};

  initial begin
    we5 = 0; se5 = 0; we7 = 0; se7 = 0; we4 = 0; se4 = 0; ie4 = 0;
    wa5 = 0; wv5 = 0; wc5 = 0; sv5 = 0; sc5 = 0;
    wa7 = 0; wv7 = 0; wc7 = 0; sv7 = 0; sc7 = 0;
    wa4 = 0; wv4 = 0; wc4 = 0; sv4 = 0; sc4 = 0; re4 = '1; ia4 = 0; ifv4 = 0; ifc4 = 0;
    for (int i = 0; i < 4; i++) begin rv[i] = '0; rc[i] = '1; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- route table example
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); we5 = 1; wa5 = 2'(i); wv5 = 5'(s2v(fig1[i])); wc5 = 5'(s2c(fig1[i]));
    end
    @(negedge clk); we5 = 0; se5 = 1; sv5 = 5'b01101; sc5 = '1;
    @(negedge clk); se5 = 0;
    chk(rv5, "u5 rvalid one cycle after search");
    chk(ml5 == 4'b0110, $sformatf("u5 matchlines %b, expected 0110", ml5));
    chk(ad5 == 2'b01 && hit5 && mu5, $sformatf("u5 addr=%b hit=%b multi=%b", ad5, hit5, mu5));
    @(negedge clk);
    chk(!rv5, "u5 rvalid drops");

    // ---- parity CAM example
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); we7 = 1; wa7 = 3'(i); wv7 = 7'(s2v(fig3[i])); wc7 = '1;
    end
    @(negedge clk); we7 = 0; se7 = 1; sv7 = 7'b0000101; sc7 = '1;
    @(negedge clk); se7 = 0;
    chk(ml7 == 5'b01000 && ad7 == 3'd3 && hit7 && !mu7, $sformatf("u7 ml=%b addr=%0d", ml7, ad7));
    begin
      logic [4:0] par;
      for (int i = 0; i < 5; i++) par[i] = u7.mem_val[i][7];
      chk(par == 5'b00100, $sformatf("u7 stored parity digits %b, expected 00100 (word 2 = 1)", par));
      // word 2 differs from the key in one data bit and in the parity digit
      chk(((u7.mem_val[2] ^ {1'b0, 7'b0000101}) == 8'b1000_0100),
          "u7 one-bit data mismatch also mismatches the parity digit");
    end

    // ---- random test of the default size
    for (int n = 0; n < 3000; n++) begin
      int op;
      @(negedge clk);
      we4 = 0; se4 = 0; ie4 = 0;
      op = $urandom % 10;
      if (op < 3) begin
        we4 = 1; wa4 = 2'($urandom); wv4 = 4'($urandom);
        wc4 = ($urandom % 3 == 0) ? 4'($urandom) : 4'hF;
      end else if (op == 3) begin
        ie4 = 1; ia4 = 2'($urandom); ifv4 = 5'($urandom); ifc4 = ($urandom % 2 != 0) ? 5'($urandom) : '0;
      end else begin
        se4 = 1; sv4 = 4'($urandom);
        sc4 = ($urandom % 3 == 0) ? 4'($urandom) : 4'hF;
        re4 = ($urandom % 4 == 0) ? 4'($urandom) : 4'hF;
      end
      @(posedge clk);
      #1;
      if (se4) begin
        logic [3:0] exp_ml;
        logic [4:0] kv, kc;
        kv = {^sv4, sv4};
        kc = {&sc4, sc4};
        for (int i = 0; i < 4; i++)
          exp_ml[i] = re4[i] && ((rc[i] & kc & (rv[i] ^ kv)) == '0);
        chk(rv4 && ml4 == exp_ml, $sformatf("u4 search %b/%b ml=%b exp=%b", sv4, sc4, ml4, exp_ml));
      end
      if (we4) begin rv[wa4] = {^wv4, wv4}; rc[wa4] = {&wc4, wc4}; end
      if (ie4) begin rv[ia4] ^= ifv4; rc[ia4] ^= ifc4; end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
