// tb_key_mux: self-checking test of the key multiplexer.
//
// Applies random words to the three sources and checks, for every select
// code, that the selected word (or the all-zero word for SEL_NONE) appears
// on the output.
module tb_key_mux;
  import tcam_pkg::*;

  int checks = 0, failures = 0;

  key_sel_e    sel;
  logic [27:0] sv, sc, xv, xc, dv, dc, ov, oc;

  key_mux #(.N(28)) dut (
    .sel(sel), .search_val(sv), .search_care(sc), .xkey_val(xv), .xkey_care(xc),
    .data_val(dv), .data_care(dc), .out_val(ov), .out_care(oc)
  );

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [27:0] ev, ec;
      sv = 28'($urandom); sc = 28'($urandom);
      xv = 28'($urandom); xc = 28'($urandom);
      dv = 28'($urandom); dc = 28'($urandom);
      sel = key_sel_e'(n % 4);
      case (n % 4)
        0: begin ev = sv; ec = sc; end
        1: begin ev = xv; ec = xc; end
        2: begin ev = dv; ec = dc; end
        default: begin ev = '0; ec = '0; end
      endcase
      #1 checks++;
      if (ov !== ev || oc !== ec) begin
        failures++;
        $display("FAIL sel=%0d out=%h/%h exp=%h/%h", n % 4, ov, oc, ev, ec);
      end
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
