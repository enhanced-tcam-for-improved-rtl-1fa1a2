// tb_ecc_sram: self-checking test of the SECDED backup memory.
//
// Writes random words, reads them back (data one cycle after re), then
// flips every single codeword bit of a stored word in turn (expects the
// original data with corrected high, and a clean second read because the
// corrected word is written back) and random pairs of bits (expects
// uncorrectable high, and no write-back). Sizes: 8-bit data (4 ternary digits) and 56-bit data
// (28 ternary digits, the ATM key).
module tb_ecc_sram;
  import tcam_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int CW8  = secded_cw(8);
  localparam int CW56 = secded_cw(56);

  logic we, re, ie, rvalid, corr, unc;
  logic [1:0] wa, ra, ia;
  logic [7:0] wd, rd;
  logic [CW8-1:0] flip;
  ecc_sram dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(wa), .wdata(wd), .re(re), .raddr(ra),
    .rvalid(rvalid), .rdata(rd), .corrected(corr), .uncorrectable(unc),
    .inj_en(ie), .inj_addr(ia), .inj_flip(flip));

  logic we2, re2, ie2, rvalid2, corr2, unc2;
  logic [3:0] wa2, ra2, ia2;
  logic [55:0] wd2, rd2;
  logic [CW56-1:0] flip2;
  ecc_sram #(.DW(56), .W(16)) dut2 (.clk(clk), .rst_n(rst_n), .we(we2), .waddr(wa2), .wdata(wd2),
    .re(re2), .raddr(ra2), .rvalid(rvalid2), .rdata(rd2), .corrected(corr2), .uncorrectable(unc2),
    .inj_en(ie2), .inj_addr(ia2), .inj_flip(flip2));

  logic [7:0]  ref8 [4];
  logic [55:0] ref56 [16];

  task automatic rd8(input int a, input bit exp_corr, input bit exp_unc);
    @(negedge clk); re = 1; ra = 2'(a);
    @(negedge clk); re = 0;
    chk(rvalid, "rvalid one cycle after re");
    chk(corr == exp_corr && unc == exp_unc, $sformatf("addr %0d corr=%b unc=%b exp %b %b", a, corr, unc, exp_corr, exp_unc));
    if (!exp_unc) chk(rd == ref8[a], $sformatf("addr %0d data %h exp %h", a, rd, ref8[a]));
  endtask

  task automatic rd56(input int a, input bit exp_corr, input bit exp_unc);
    @(negedge clk); re2 = 1; ra2 = 4'(a);
    @(negedge clk); re2 = 0;
    chk(corr2 == exp_corr && unc2 == exp_unc, $sformatf("56b addr %0d corr=%b unc=%b", a, corr2, unc2));
    if (!exp_unc) chk(rd2 == ref56[a], $sformatf("56b addr %0d data %h exp %h", a, rd2, ref56[a]));
  endtask

  task automatic inj8(input int a, input logic [CW8-1:0] f);
    @(negedge clk); ie = 1; ia = 2'(a); flip = f;
    @(negedge clk); ie = 0;
  endtask

  task automatic inj56(input int a, input logic [CW56-1:0] f);
    @(negedge clk); ie2 = 1; ia2 = 4'(a); flip2 = f;
    @(negedge clk); ie2 = 0;
  endtask

  initial begin
    we = 0; re = 0; ie = 0; wa = 0; ra = 0; ia = 0; wd = 0; flip = 0;
    we2 = 0; re2 = 0; ie2 = 0; wa2 = 0; ra2 = 0; ia2 = 0; wd2 = 0; flip2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int a = 0; a < 4; a++) begin
        @(negedge clk); we = 1; wa = 2'(a); wd = 8'($urandom); ref8[a] = wd;
      end
      for (int a = 0; a < 16; a++) begin
        @(negedge clk); we2 = 1; wa2 = 4'(a); wd2 = 56'({$urandom, $urandom}); ref56[a] = wd2;
      end
      @(negedge clk); we = 0; we2 = 0;
      for (int a = 0; a < 4; a++) rd8(a, 0, 0);
      for (int a = 0; a < 16; a++) rd56(a, 0, 0);
      // every single-bit error is corrected
      for (int b = 0; b < CW8; b++) begin
        int a;
        a = $urandom % 4;
        inj8(a, CW8'(1) << b);
        rd8(a, 1, 0);
        rd8(a, 0, 0);  // the corrected word was written back
      end
      for (int b = 0; b < CW56; b++) begin
        int a;
        a = $urandom % 16;
        inj56(a, CW56'(1) << b);
        rd56(a, 1, 0);
        rd56(a, 0, 0);
      end
      // double errors are detected
      for (int n = 0; n < 20; n++) begin
        int a, b1, b2;
        logic [CW8-1:0] f;
        a = $urandom % 4;
        b1 = $urandom % CW8;
        b2 = (b1 + 1 + $urandom % (CW8 - 1)) % CW8;
        f = (CW8'(1) << b1) | (CW8'(1) << b2);
        inj8(a, f);
        rd8(a, 0, 1);
        rd8(a, 0, 1);  // not written back
        inj8(a, f);
        rd8(a, 0, 0);
      end
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
