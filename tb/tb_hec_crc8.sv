// tb_hec_crc8: self-checking test of the HEC generator.
//
// Known header/HEC pairs (an all-zero header gives 0x55, the idle-cell
// header 00 00 00 01 gives 0x52) and random headers compared with a
// reference that divides the header followed by eight zero bits by
// x^8 + x^2 + x + 1 (0x107) in long division and adds the 0x55 coset.
// The ok output is checked with the right HEC and with a corrupted one.
module tb_hec_crc8;

  int checks = 0, failures = 0;

  logic [31:0] hdr;
  logic [7:0]  hec_in, hec;
  logic        ok;

  hec_crc8 dut (.hdr(hdr), .hec_in(hec_in), .hec(hec), .ok(ok));

  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  task automatic check(input logic [31:0] h, input logic [7:0] exp);
    hdr = h;
    hec_in = exp;
    #1 checks++;
    if (hec !== exp || !ok) begin
      failures++;
      $display("FAIL hdr=%h hec=%h exp=%h", h, hec, exp);
    end
    hec_in = exp ^ 8'(1 << ($urandom % 8));
    #1 checks++;
    if (ok) begin failures++; $display("FAIL ok on bad hec, hdr=%h", h); end
  endtask

  initial begin
    check(32'h0000_0000, 8'h55);
    check(32'h0000_0001, 8'h52);
    for (int n = 0; n < 300; n++) begin
      logic [31:0] h;
      h = $urandom;
      check(h, ref_hec(h));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
