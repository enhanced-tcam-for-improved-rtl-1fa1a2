// tb_atm_tcam_top: end-to-end test of the ATM translator on the
// error-tolerant Parity TCAM, with every parameter at its default
// (16 connections, 16 X-keys, 28-digit keys).
//
// Sequence:
//  1. Configure 16 connections (one a whole virtual path with VCI don't
//     care) and load one X-key per connection (its own key), computed from
//     the table in the testbench.
//  2. UNI traffic: known, unknown and bad-HEC cells, every output header
//     checked against a reference built in the testbench, latency 3 cycles.
//  3. Soft errors: connection 3 is corrupted in several bits so that it
//     holds connection 5's key (a multiple match), connection 7 in two bits,
//     and connection 7's backup copy in one bit. Traffic to these
//     connections is sent unchecked and must show wrong translations.
//  4. Test mode while cells keep arriving: the cells stall until the test
//     pass has found and repaired the errors.
//  5. Regular mode again, then NNI traffic: everything must be right.
// Each mechanism (hit, miss, bad HEC, path switching, stall, multiple
// match, detection, repair, ECC correction, mode switch, NNI format) is
// counted and must have happened at least once.
module tb_atm_tcam_top;
  import tcam_pkg::*;

  localparam int W = 16, N = ATM_KEY_W, NX = 16;
  localparam int ECW = secded_cw(2 * N);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  mode_e        mode;
  logic         nni, in_valid, in_ready, out_valid, out_hit, out_hec_err;
  logic [39:0]  in_hdr, out_hdr;
  logic         cfg_wr_en, cfg_ready;
  logic [3:0]   cfg_addr;
  logic [N-1:0] cfg_key_val, cfg_key_care;
  logic [11:0]  cfg_new_vpi;
  logic [15:0]  cfg_new_vci;
  logic         x_we, x_wexp_hit, x_wvalid;
  logic [3:0]   x_widx, x_wexp_addr;
  logic [N-1:0] x_wval, x_wcare;
  logic         test_busy, pass_done, sram_corrected, multi_match;
  logic [15:0]  err_cnt, fix_cnt, fail_cnt, unc_cnt, pass_cnt;
  logic         tinj_en, sinj_en;
  logic [3:0]   tinj_addr, sinj_addr;
  logic [N:0]   tinj_flip_val, tinj_flip_care;
  logic [ECW-1:0] sinj_flip;

  atm_tcam_top dut (.*);

  // reference connection table
  logic [N-1:0] kv [W], kc [W];
  logic [27:0]  nv [W];

  function automatic logic [7:0] hec_of(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  function automatic int lookup(input logic [27:0] k);
    for (int i = 0; i < W; i++) if ((kc[i] & (kv[i] ^ k)) == '0) return i;
    return -1;
  endfunction

  function automatic logic [39:0] make_hdr(input logic [11:0] vpi, input logic [15:0] vci, input bit is_nni);
    logic [39:0] h;
    h = {4'h0, 8'($urandom), vci, 3'($urandom), 1'($urandom), 8'h00};
    if (is_nni) h[39:28] = vpi;
    else        h[35:28] = vpi[7:0];
    h[7:0] = hec_of(h[39:8]);
    return h;
  endfunction

  // ------------------------------------------------------------ monitor
  typedef struct { logic [39:0] hdr; logic hit; logic bad; bit strict; int due; } exp_t;
  exp_t q [$];
  int cycle = 0;
  bit strict = 1;
  int n_hit = 0, n_miss = 0, n_bad = 0, n_vp = 0, n_stall = 0, n_multi = 0;
  int n_wrong = 0, n_corr = 0, n_nni = 0, n_mode = 0;
  mode_e last_mode = MODE_REGULAR;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (mode != last_mode) n_mode++;
      last_mode <= mode;
      if (multi_match) n_multi++;
      if (sram_corrected && dut.u_cam.sr_rvalid) n_corr++;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        exp_t e;
        logic [11:0] vpi;
        int a;
        e.due = cycle + 3;
        e.hdr = in_hdr;
        e.hit = 1'b0;
        e.strict = strict;
        e.bad = (hec_of(in_hdr[39:8]) != in_hdr[7:0]);
        vpi = nni ? in_hdr[39:28] : {4'h0, in_hdr[35:28]};
        a = lookup({vpi, in_hdr[27:12]});
        if (!e.bad && a >= 0) begin
          logic [39:0] h;
          h = in_hdr;
          if (nni) h[39:28] = nv[a][27:16];
          else     h[35:28] = nv[a][23:16];
          h[27:12] = nv[a][15:0];
          h[7:0] = hec_of(h[39:8]);
          e.hdr = h;
          e.hit = 1'b1;
          if (kc[a][15:0] == '0) n_vp++;
        end
        if (nni) n_nni++;
        if (e.bad) n_bad++;
        else if (e.hit) n_hit++;
        else n_miss++;
        q.push_back(e);
      end
      if (out_valid) begin
        exp_t e;
        if (q.size() == 0) chk(0, "output without input");
        else begin
          bit same;
          e = q.pop_front();
          chk(cycle == e.due, $sformatf("latency: out at %0d, due %0d", cycle, e.due));
          same = (out_hdr == e.hdr) && (out_hit == e.hit) && (out_hec_err == e.bad);
          if (e.strict)
            chk(same, $sformatf("hdr %h hit %b bad %b, exp %h %b %b", out_hdr, out_hit, out_hec_err, e.hdr, e.hit, e.bad));
          else if (!same) n_wrong++;
        end
      end
    end
  end

  // ------------------------------------------------------------ drivers
  task automatic send(input int count, input bit only_ok, input int target);
    // only_ok: skip connections 3, 5, 7 and the path entry (targets of the
    // injected errors); target >= 0 sends only to that connection
    for (int n = 0; n < count; n++) begin
      int a, kind;
      logic [39:0] h;
      kind = $urandom % 10;
      do a = $urandom % (W - 1); while (only_ok && (a == 3 || a == 5 || a == 7));
      if (target >= 0) begin a = target; kind = 0; end
      if (kind < 6)                    h = make_hdr(kv[a][27:16], kv[a][15:0], nni);
      else if (kind < 8 && !only_ok)   h = make_hdr(kv[W-1][27:16], 16'($urandom), nni);
      else                             h = make_hdr(12'h0F0 | 12'($urandom % 16), 16'($urandom), nni);
      if (kind == 9) h[7:0] ^= 8'h80;
      @(negedge clk);
      in_valid = 1; in_hdr = h;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  task automatic configure(input int a, input logic [27:0] v, input logic [27:0] c, input logic [27:0] nvv);
    @(negedge clk);
    while (!cfg_ready) @(negedge clk);
    cfg_wr_en = 1; cfg_addr = 4'(a); cfg_key_val = v; cfg_key_care = c;
    {cfg_new_vpi, cfg_new_vci} = nvv;
    kv[a] = v; kc[a] = c; nv[a] = nvv;
    @(negedge clk); cfg_wr_en = 0;
  endtask

  initial begin
    mode = MODE_REGULAR; nni = 0; in_valid = 0; in_hdr = 0;
    cfg_wr_en = 0; cfg_addr = 0; cfg_key_val = 0; cfg_key_care = 0; cfg_new_vpi = 0; cfg_new_vci = 0;
    x_we = 0; x_widx = 0; x_wval = 0; x_wcare = 0; x_wexp_addr = 0; x_wexp_hit = 0; x_wvalid = 0;
    tinj_en = 0; tinj_addr = 0; tinj_flip_val = 0; tinj_flip_care = 0;
    sinj_en = 0; sinj_addr = 0; sinj_flip = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. connections: VPI 1..15 (distinct), VCI random; entry 15 a whole path
    for (int i = 0; i < W - 1; i++)
      configure(i, {12'(i + 1), 16'($urandom | 1)}, '1, 28'($urandom));
    configure(W - 1, {12'h0AA, 16'h0000}, {12'hFFF, 16'h0000}, 28'($urandom));
    for (int k = 0; k < NX; k++) begin
      @(negedge clk);
      x_we = 1; x_widx = 4'(k); x_wval = kv[k]; x_wcare = kc[k];
      x_wexp_addr = 4'(k); x_wexp_hit = 1; x_wvalid = 1;
    end
    @(negedge clk); x_we = 0;
    repeat (4) @(negedge clk);

    // 2. regular UNI traffic
    send(300, 0, -1);

    // 3. soft errors
    @(negedge clk);
    tinj_en = 1; tinj_addr = 5;
    tinj_flip_val = {^(kv[3] ^ kv[5]), kv[3] ^ kv[5]};
    tinj_flip_care = '0;
    @(negedge clk);
    tinj_addr = 7;
    tinj_flip_val = (N + 1)'(29'b1_0000_0000_0000_0000_0000_0100_0001 & 29'h0FFF_FFFF) | (N + 1)'(1 << 20);
    sinj_en = 1; sinj_addr = 7; sinj_flip = ECW'(1) << 9;
    @(negedge clk);
    tinj_en = 0; sinj_en = 0;
    strict = 0;
    send(10, 0, 3);
    send(10, 0, 5);
    send(10, 0, 7);
    strict = 1;
    chk(n_wrong > 0, "soft errors corrupt translations before repair");
    chk(n_multi > 0, "a multiple match is seen");

    // 4. test mode while good traffic keeps arriving
    fork
      begin
        @(negedge clk); mode = MODE_TEST;
        wait (pass_cnt != 0);
        @(negedge clk); mode = MODE_REGULAR;
      end
      send(100, 1, -1);
    join
    chk(err_cnt >= 2, $sformatf("errors detected: %0d", err_cnt));
    chk(fix_cnt >= 3, $sformatf("words rewritten: %0d", fix_cnt));
    chk(fail_cnt == 0 && unc_cnt == 0, "every error repaired");
    chk(n_corr > 0, "backup word corrected by ECC on its way back");

    // 5. all connections right again, UNI then NNI
    send(300, 0, -1);
    @(negedge clk); nni = 1;
    send(300, 0, -1);
    chk(q.size() == 0, "every cell came out");

    chk(n_hit > 0 && n_miss > 0 && n_bad > 0 && n_vp > 0 && n_stall > 0 && n_nni > 0 && n_mode >= 2,
        $sformatf("all mechanisms seen: hit %0d miss %0d bad-hec %0d path %0d stall %0d nni %0d mode-switch %0d",
                  n_hit, n_miss, n_bad, n_vp, n_stall, n_nni, n_mode));
    $display("EVENT hit=%0d miss=%0d bad_hec=%0d path=%0d stall=%0d multi=%0d wrong_before_repair=%0d errors=%0d rewrites=%0d ecc=%0d nni=%0d mode_switches=%0d",
             n_hit, n_miss, n_bad, n_vp, n_stall, n_multi, n_wrong, err_cnt, fix_cnt, n_corr, n_nni, n_mode);
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
