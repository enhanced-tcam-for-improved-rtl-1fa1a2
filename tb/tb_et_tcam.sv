// tb_et_tcam: end-to-end test of the error-tolerant Parity TCAM at its
// default size (4 words of 4 ternary digits, 8 X-keys).
//
// A reference table kept in the testbench gives the expected answer of
// every search. The test loads a table, loads X-keys computed from it (each
// word, and each word with its lowest digit don't care; an X-key is marked
// valid only if it matches exactly one word), and then:
//  * searches every fully specified key and random partial keys, checking
//    address, hit and multiple-match flag one cycle after the search;
//  * runs a test pass on the fault-free table (no error may be found);
//  * flips 1 to 3 stored bits of random words (random soft errors), checks
//    that the corruption is visible to searches, runs a test pass and
//    checks that every search is right again;
//  * also flips one bit of the backup copy of a corrupted word, so the
//    repair must go through the ECC correction;
//  * flips one bit of the backup alone and checks that the sweep at the end
//    of a pass corrects it and writes it back.
module tb_et_tcam;
  import tcam_pkg::*;

  localparam int N = 4, W = 4, NX = 8;
  localparam int ECW = secded_cw(2 * N);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  mode_e        mode;
  logic         wr_en, wr_ready, s_valid, s_ready, r_valid, r_hit, r_multi;
  logic [1:0]   wr_addr, r_addr;
  logic [N-1:0] wr_val, wr_care, s_val, s_care;
  logic         x_we, x_wexp_hit, x_wvalid;
  logic [2:0]   x_widx;
  logic [N-1:0] x_wval, x_wcare;
  logic [1:0]   x_wexp_addr;
  logic         test_busy, pass_done, sram_corrected;
  logic [15:0]  err_cnt, fix_cnt, fail_cnt, unc_cnt, pass_cnt;
  logic         tinj_en, sinj_en;
  logic [1:0]   tinj_addr, sinj_addr;
  logic [N:0]   tinj_flip_val, tinj_flip_care;
  logic [ECW-1:0] sinj_flip;

  et_tcam dut (.*);

  logic [N-1:0] gv [W], gc [W];
  int corr_seen = 0, wrong_seen = 0, sweep_fixes = 0;

  always @(posedge clk) if (sram_corrected && dut.sr_rvalid) corr_seen++;

  function automatic void ref_search(input logic [N-1:0] v, input logic [N-1:0] c,
                                     output logic hit, output logic multi, output logic [1:0] a);
    int cnt = 0;
    a = '0;
    for (int i = W - 1; i >= 0; i--)
      if ((gc[i] & c & (gv[i] ^ v)) == '0) begin cnt++; a = 2'(i); end
    hit = cnt > 0;
    multi = cnt > 1;
  endfunction

  task automatic host_write(input int a, input logic [N-1:0] v, input logic [N-1:0] c);
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    wr_en = 1; wr_addr = 2'(a); wr_val = v; wr_care = c;
    gv[a] = v; gc[a] = c;
    @(negedge clk); wr_en = 0;
    repeat (2) @(negedge clk);
  endtask

  // one search; returns 1 when the answer equals the reference
  task automatic search(input logic [N-1:0] v, input logic [N-1:0] c, input bit must_match, output bit same);
    logic eh, em;
    logic [1:0] ea;
    @(negedge clk);
    while (!s_ready) @(negedge clk);
    s_valid = 1; s_val = v; s_care = c;
    ref_search(v, c, eh, em, ea);
    @(negedge clk); s_valid = 0;
    chk(r_valid, "result one cycle after the search");
    same = (r_hit == eh) && (r_multi == em) && (!eh || r_addr == ea);
    if (must_match)
      chk(same, $sformatf("search %b/%b got hit=%b multi=%b addr=%0d exp %b %b %0d",
                          v, c, r_hit, r_multi, r_addr, eh, em, ea));
  endtask

  task automatic all_searches(input bit must_match, output int wrong);
    bit same;
    wrong = 0;
    for (int k = 0; k < 16; k++) begin
      search(N'(k), '1, must_match, same);
      if (!same) wrong++;
    end
    for (int k = 0; k < 8; k++) begin
      search(N'($urandom), N'($urandom), must_match, same);
      if (!same) wrong++;
    end
  endtask

  task automatic load_xkeys();
    for (int k = 0; k < NX; k++) begin
      logic [N-1:0] v, c;
      logic eh, em;
      logic [1:0] ea;
      v = gv[k % W];
      c = (k < W) ? gc[k] : (gc[k % W] & ~N'(1));
      ref_search(v, c, eh, em, ea);
      @(negedge clk);
      x_we = 1; x_widx = 3'(k); x_wval = v; x_wcare = c;
      x_wexp_addr = ea; x_wexp_hit = eh; x_wvalid = eh && !em;
    end
    @(negedge clk); x_we = 0;
  endtask

  task automatic run_pass();
    int start;
    start = int'(pass_cnt);
    @(negedge clk); mode = MODE_TEST;
    for (int i = 0; i < 500 && int'(pass_cnt) == start; i++) @(negedge clk);
    chk(int'(pass_cnt) == start + 1, "test pass completes");
    mode = MODE_REGULAR;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int wrong;
    mode = MODE_REGULAR; wr_en = 0; wr_addr = 0; wr_val = 0; wr_care = 0;
    s_valid = 0; s_val = 0; s_care = 0;
    x_we = 0; x_widx = 0; x_wval = 0; x_wcare = 0; x_wexp_addr = 0; x_wexp_hit = 0; x_wvalid = 0;
    tinj_en = 0; tinj_addr = 0; tinj_flip_val = 0; tinj_flip_care = 0;
    sinj_en = 0; sinj_addr = 0; sinj_flip = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int round = 0; round < 12; round++) begin
      // a table of words that differ above the lowest digit (so every
      // X-key matches one word only), word 3 sometimes with a don't-care
      // lowest digit
      logic [15:0] perm;
      perm = 16'($urandom);
      for (int i = 0; i < W; i++) begin
        logic [N-1:0] v;
        bit dup;
        do begin
          v = N'($urandom);
          dup = 0;
          for (int j = 0; j < i; j++) if (gv[j][N-1:1] == v[N-1:1]) dup = 1;
        end while (dup);
        gv[i] = v;  // reserve the value for the duplicate check
        host_write(i, v, (i == 3 && perm[0]) ? 4'b1110 : 4'b1111);
      end
      load_xkeys();
      all_searches(1, wrong);

      run_pass();
      chk(fail_cnt == 0, "no unrepaired key");
      begin
        int e0;
        e0 = int'(err_cnt);
        run_pass();
        chk(int'(err_cnt) == e0, "fault-free pass finds nothing");
      end

      // a flip in the backup alone is repaired by the sweep at the end of a
      // pass: corrected once, clean on the next pass
      begin
        int c0;
        @(negedge clk);
        sinj_en = 1; sinj_addr = 2'($urandom); sinj_flip = ECW'(1) << ($urandom % ECW);
        @(negedge clk); sinj_en = 0;
        c0 = corr_seen;
        run_pass();
        chk(corr_seen == c0 + 1, "backup flip corrected by the sweep");
        c0 = corr_seen;
        run_pass();
        chk(corr_seen == c0, "backup word was written back");
        sweep_fixes++;
      end

      // soft errors: 1 to 3 value bits of data digits in up to two words
      for (int hit_words = 0; hit_words < 1 + round % 2; hit_words++) begin
        logic [N:0] f;
        f = '0;
        for (int b = 0; b < 1 + $urandom % 3; b++) f[$urandom % N] = 1'b1;
        if (f == '0) f[0] = 1'b1;
        @(negedge clk);
        tinj_en = 1; tinj_addr = 2'((round + hit_words * 2) % W); tinj_flip_val = f & {1'b0, gc[tinj_addr]};
        if (tinj_flip_val == '0) tinj_flip_val = 5'b00001 & {1'b0, gc[tinj_addr]};
        tinj_flip_care = '0;
        // every third round the backup copy of that word takes a hit too
        if (round % 3 == 2) begin sinj_en = 1; sinj_addr = tinj_addr; sinj_flip = ECW'(1) << ($urandom % ECW); end
        @(negedge clk); tinj_en = 0; sinj_en = 0;
      end
      all_searches(0, wrong);
      if (wrong > 0) wrong_seen++;
      begin
        int e0;
        e0 = int'(err_cnt);
        run_pass();
        chk(int'(err_cnt) > e0, "soft error detected by the X-keys");
      end
      chk(fail_cnt == 0, "repair succeeded");
      all_searches(1, wrong);
    end
    chk(wrong_seen > 0, "injected errors changed search results before repair");
    chk(corr_seen > 0, "a repair read a backup word through ECC correction");
    $display("EVENT errors=%0d rewrites=%0d passes=%0d corrupted_rounds=%0d ecc_corrections=%0d",
             err_cnt, fix_cnt, pass_cnt, wrong_seen, corr_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
