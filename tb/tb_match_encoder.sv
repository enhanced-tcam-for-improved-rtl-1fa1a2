// tb_match_encoder: self-checking test of the matchline encoder.
//
// Drives every matchline pattern of a 4-word array and random patterns of a
// 16-word array, and compares addr/hit/multi with a reference computed by
// counting the set bits and scanning from word 0.
module tb_match_encoder;

  int checks = 0, failures = 0;

  logic [3:0]  ml4;
  logic [1:0]  addr4;
  logic        hit4, multi4;
  logic [15:0] ml16;
  logic [3:0]  addr16;
  logic        hit16, multi16;

  match_encoder dut4 (.ml(ml4), .addr(addr4), .hit(hit4), .multi(multi4));
  match_encoder #(.W(16)) dut16 (.ml(ml16), .addr(addr16), .hit(hit16), .multi(multi16));

  task automatic check_vec(input logic [15:0] v, input int w, input int got_addr,
                           input logic got_hit, input logic got_multi);
    int cnt, first;
    cnt = 0;
    first = 0;
    for (int i = w - 1; i >= 0; i--) if (v[i]) begin cnt++; first = i; end
    checks++;
    if (got_hit !== (cnt > 0) || got_multi !== (cnt > 1) || (cnt > 0 && got_addr != first)) begin
      failures++;
      $display("FAIL w=%0d ml=%h addr=%0d hit=%b multi=%b", w, v, got_addr, got_hit, got_multi);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      ml4 = 4'(v);
      #1 check_vec(16'(v), 4, int'(addr4), hit4, multi4);
    end
    // route-table example: words 1 and 2 match, encoder gives 01
    ml4 = 4'b0110;
    #1 checks++;
    if (addr4 != 2'b01 || !multi4) begin failures++; $display("FAIL fig1 pattern"); end
    for (int n = 0; n < 500; n++) begin
      ml16 = 16'($urandom);
      if (n % 3 == 0) ml16 = 16'(1) << ($urandom % 16);
      if (n % 7 == 0) ml16 = '0;
      #1 check_vec(ml16, 16, int'(addr16), hit16, multi16);
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
