// tb_xlate_ram: self-checking test of the VPI/VCI translation memory.
//
// Checks reset to zero, random writes, and reads returning the stored entry
// exactly one cycle after re (rvalid), with writes and reads interleaved.
module tb_xlate_ram;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        we, re, rvalid;
  logic [3:0]  wa, ra;
  logic [27:0] wd, rd;

  xlate_ram dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(wa), .wdata(wd), .re(re), .raddr(ra),
    .rvalid(rvalid), .rdata(rd));

  logic [27:0] mem_ref [16];

  initial begin
    we = 0; re = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < 16; i++) mem_ref[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [27:0] exp;
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = 28'($urandom);
      re = 1'($urandom); ra = 4'($urandom);
      exp = mem_ref[ra];
      @(posedge clk);
      if (we) mem_ref[wa] = wd;
      #1;
      if (re) begin
        checks++;
        if (!rvalid || rd !== exp) begin
          failures++;
          $display("FAIL read %0d got %h exp %h", ra, rd, exp);
        end
      end else begin
        checks++;
        if (rvalid) begin failures++; $display("FAIL rvalid without re"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
