// tb_xkey_lut: self-checking test of the X look-up memory.
//
// Checks that reset leaves every entry invalid, then writes random X-keys
// with random expectations and valid bits and reads every entry back through
// the asynchronous read port.
module tb_xkey_lut;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we, wexp_hit, wvalid, exp_hit, valid;
  logic [2:0] widx, idx;
  logic [3:0] wval, wcare, xval, xcare;
  logic [1:0] wexp_addr, exp_addr;

  xkey_lut dut (.clk(clk), .rst_n(rst_n), .we(we), .widx(widx), .wval(wval), .wcare(wcare),
    .wexp_addr(wexp_addr), .wexp_hit(wexp_hit), .wvalid(wvalid), .idx(idx),
    .xval(xval), .xcare(xcare), .exp_addr(exp_addr), .exp_hit(exp_hit), .valid(valid));

  logic [10:0] ref_e [8];
  logic        ref_v [8];

  initial begin
    we = 0; widx = 0; wval = 0; wcare = 0; wexp_addr = 0; wexp_hit = 0; wvalid = 0; idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      idx = 3'(i);
      #1 checks++;
      if (valid) begin failures++; $display("FAIL entry %0d valid after reset", i); end
    end
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        we = 1; widx = 3'(i); wval = 4'($urandom); wcare = 4'($urandom);
        wexp_addr = 2'($urandom); wexp_hit = 1'($urandom); wvalid = 1'($urandom);
        ref_e[i] = {wval, wcare, wexp_addr, wexp_hit};
        ref_v[i] = wvalid;
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 8; i++) begin
        idx = 3'(i);
        #1 checks++;
        if ({xval, xcare, exp_addr, exp_hit} !== ref_e[i] || valid !== ref_v[i]) begin
          failures++;
          $display("FAIL entry %0d read %h/%b exp %h/%b", i, {xval, xcare, exp_addr, exp_hit}, valid, ref_e[i], ref_v[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
