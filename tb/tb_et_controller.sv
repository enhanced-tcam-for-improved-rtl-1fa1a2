// tb_et_controller: self-checking test of the error-tolerant TCAM controller
// against behavioural models of its surroundings.
//
// The testbench models the Parity TCAM (an array searched with the applied
// key, answering one cycle later), the ECC-SRAM (a golden copy written on
// sram_we and read on sram_re) and the X look-up memory. It checks that:
//  * host writes reach the SRAM at once and the TCAM through an SRAM read
//    followed by a write with the multiplexer on SEL_DATA at that address;
//  * regular searches use SEL_SEARCH and r_valid comes one cycle later;
//  * in test mode searches use SEL_XKEY, s_ready is low, and a pass over a
//    fault-free table finds nothing;
//  * after multi-bit corruption of words in the TCAM model a pass detects
//    the error, rewrites the corrupted words from the golden copy (model
//    equal to golden afterwards) and counts no failure;
//  * every pass ends with one read of each backup word (the sweep that lets
//    the ECC-SRAM repair itself);
//  * an uncorrectable SRAM read blocks the TCAM write and is counted.
module tb_et_controller;
  import tcam_pkg::*;

  localparam int W = 4, N = 4, NX = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  mode_e      mode;
  logic       wr_en, wr_ready, s_valid, s_ready, r_valid;
  logic [1:0] wr_addr;
  key_sel_e   sel;
  logic       tcam_search, tcam_we, tcam_rvalid, tcam_hit, tcam_multi;
  logic [3:0] tcam_row_en;
  logic [1:0] tcam_waddr, tcam_addr;
  logic       sram_we, sram_re, sram_unc;
  logic [1:0] sram_waddr, sram_raddr;
  logic [2:0] xidx;
  logic       x_valid, x_exp_hit;
  logic [1:0] x_exp_addr;
  logic       test_busy, pass_done;
  logic [15:0] err_cnt, fix_cnt, fail_cnt, unc_cnt, pass_cnt;

  et_controller dut (.*);

  // host data that goes with wr_en / s_valid
  logic [N-1:0] wr_val, wr_care, s_val, s_care;

  // models
  logic [N-1:0] tv [W], tc [W];      // TCAM contents
  logic [N-1:0] gv [W], gc [W];      // golden (SRAM) contents
  logic [N-1:0] xv [NX], xc [NX];
  logic [1:0]   xa [NX];
  logic         xh [NX], xval [NX];
  logic         force_unc;
  logic         last_re;
  logic [1:0]   last_raddr;
  int           searches_x, rewrites;
  int           reads [W];

  assign x_valid    = xval[xidx];
  assign x_exp_addr = xa[xidx];
  assign x_exp_hit  = xh[xidx];

  function automatic logic [W-1:0] model_match(input logic [N-1:0] kv, input logic [N-1:0] kc,
                                               input logic [W-1:0] en);
    logic [W-1:0] m;
    for (int i = 0; i < W; i++) m[i] = en[i] && ((tc[i] & kc & (tv[i] ^ kv)) == '0);
    return m;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      logic [W-1:0] m;
      tcam_rvalid <= tcam_search;
      if (tcam_search) begin
        if (sel == SEL_XKEY) begin
          m = model_match(xv[xidx], xc[xidx], tcam_row_en);
          searches_x++;
        end else begin
          chk(sel == SEL_SEARCH, "search with select SEL_SEARCH or SEL_XKEY");
          chk(mode == MODE_REGULAR, "regular search only in regular mode");
          m = model_match(s_val, s_care, tcam_row_en);
        end
        tcam_hit   <= |m;
        tcam_multi <= $countones(m) > 1;
        tcam_addr  <= '0;
        for (int i = W - 1; i >= 0; i--) if (m[i]) tcam_addr <= 2'(i);
      end
      if (tcam_we) begin
        chk(sel == SEL_DATA, "TCAM written from the SRAM data path");
        chk(last_re && last_raddr == tcam_waddr, "TCAM write follows an SRAM read of the same word");
        tv[tcam_waddr] = gv[tcam_waddr];
        tc[tcam_waddr] = gc[tcam_waddr];
        rewrites++;
      end
      if (sram_we) begin
        gv[sram_waddr] = wr_val;
        gc[sram_waddr] = wr_care;
      end
      if (sram_re) reads[sram_raddr]++;
      last_re    <= sram_re;
      last_raddr <= sram_raddr;
      sram_unc   <= sram_re && force_unc;
    end
  end

  task automatic host_write(input int a, input logic [N-1:0] v, input logic [N-1:0] c);
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    wr_en = 1; wr_addr = 2'(a); wr_val = v; wr_care = c;
    @(negedge clk); wr_en = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic search(input logic [N-1:0] v, input logic [N-1:0] c);
    logic [W-1:0] m;
    @(negedge clk);
    chk(s_ready, "s_ready in regular idle");
    s_valid = 1; s_val = v; s_care = c;
    m = model_match(v, c, '1);
    @(negedge clk); s_valid = 0;
    chk(r_valid, "r_valid one cycle after a regular search");
    chk(tcam_hit == |m, "regular search result forwarded");
    @(negedge clk);
    chk(!r_valid, "r_valid is a single pulse");
  endtask

  task automatic run_pass(input int max_cycles);
    int start;
    start = int'(pass_cnt);
    @(negedge clk); mode = MODE_TEST;
    @(negedge clk);
    chk(!s_ready, "s_ready low in test mode");
    for (int i = 0; i < max_cycles && int'(pass_cnt) == start; i++) @(negedge clk);
    chk(int'(pass_cnt) == start + 1, "test pass completes");
    mode = MODE_REGULAR;
    repeat (3) @(negedge clk);
  endtask

  // X-keys: each stored word, and each stored word with its lowest digit X;
  // expectations from the golden table, valid only for a unique match
  task automatic build_xkeys();
    for (int k = 0; k < NX; k++) begin
      logic [W-1:0] m;
      xv[k] = gv[k % W];
      xc[k] = (k < W) ? gc[k] : (gc[k % W] & ~4'b0001);
      for (int i = 0; i < W; i++) m[i] = ((gc[i] & xc[k] & (gv[i] ^ xv[k])) == '0);
      xval[k] = ($countones(m) == 1);
      xh[k] = 1'b1;
      xa[k] = '0;
      for (int i = W - 1; i >= 0; i--) if (m[i]) xa[k] = 2'(i);
    end
  endtask

  function automatic bit tcam_equals_golden();
    for (int i = 0; i < W; i++) if (tv[i] != gv[i] || tc[i] != gc[i]) return 0;
    return 1;
  endfunction

  initial begin
    mode = MODE_REGULAR; wr_en = 0; wr_addr = 0; s_valid = 0; s_val = 0; s_care = 0;
    wr_val = 0; wr_care = 0; force_unc = 0; searches_x = 0; rewrites = 0;
    tcam_rvalid = 0; tcam_hit = 0; tcam_multi = 0; tcam_addr = 0; sram_unc = 0;
    last_re = 0; last_raddr = 0;
    for (int i = 0; i < W; i++) begin tv[i] = 0; tc[i] = '1; gv[i] = 0; gc[i] = '1; end
    for (int k = 0; k < NX; k++) begin xv[k] = 0; xc[k] = 0; xa[k] = 0; xh[k] = 0; xval[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // load a table through the host port
    host_write(0, 4'b0100, 4'b1111);
    host_write(1, 4'b0010, 4'b1110);
    host_write(2, 4'b1100, 4'b1111);
    host_write(3, 4'b1011, 4'b1111);
    chk(tcam_equals_golden(), "host writes copied into the TCAM");
    build_xkeys();

    search(4'b0100, 4'b1111);
    search(4'b0011, 4'b1111);
    search(4'b1111, 4'b1111);

    // fault-free pass; it must end with a read of every backup word
    for (int i = 0; i < W; i++) reads[i] = 0;
    run_pass(200);
    for (int i = 0; i < W; i++) chk(reads[i] == 1, $sformatf("backup word %0d read once by the sweep (%0d)", i, reads[i]));
    chk(err_cnt == 0 && fail_cnt == 0, "no error found in a fault-free table");
    chk(searches_x > 0, "X-keys applied in test mode");

    // corrupt word 2 in two bits so it equals word 0's pattern (multiple
    // match), and word 3 in three bits
    tv[2] = 4'b0100;
    tv[3] = 4'b0101;
    run_pass(400);
    chk(err_cnt > 0, "soft errors detected");
    chk(fail_cnt == 0, "all detected errors repaired");
    chk(fix_cnt > 0, "words rewritten from the backup");
    chk(tcam_equals_golden(), "TCAM equals the backup after repair");

    // a don't-care flip (care bit cleared) in word 0: X100 also matches
    // word 2's X-key 1100
    tc[0] = 4'b0111;
    run_pass(400);
    chk(tcam_equals_golden(), "care-bit flip repaired");

    // uncorrectable backup read: the word is not written
    force_unc = 1;
    begin
      int u0, r0;
      u0 = int'(unc_cnt);
      r0 = rewrites;
      host_write(1, 4'b0110, 4'b1111);
      chk(int'(unc_cnt) == u0 + 1, "uncorrectable SRAM read counted");
      chk(rewrites == r0, "no TCAM write from an uncorrectable word");
    end
    force_unc = 0;

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
