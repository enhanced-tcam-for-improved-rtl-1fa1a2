// tb_atm_translator: self-checking test of the ATM header translator with
// behavioural models of the CAM (exact and don't-care entries, answer one
// cycle after the search, random search-ready stalls) and of the
// translation RAM (synchronous read).
//
// Random UNI and NNI headers are sent back to back: known connections,
// whole-path entries whose VCI is don't care, unknown connections and
// headers with a corrupted HEC. The expected output header is built in the
// testbench from the field layout (UNI: GFC 4, VPI 8, VCI 16, PT 3, CLP 1,
// HEC 8; NNI: VPI 12 in place of GFC+VPI) with the HEC computed by long
// division. Every output is checked, as is its arrival exactly 3 cycles
// after the header was accepted.
module tb_atm_translator;

  localparam int W = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic        nni, in_valid, in_ready, cam_s_valid, cam_s_ready, cam_r_valid, cam_r_hit;
  logic [39:0] in_hdr, out_hdr;
  logic [27:0] cam_key, ram_rdata;
  logic [3:0]  cam_r_addr, ram_raddr;
  logic        ram_re, out_valid, out_hit, out_hec_err;

  atm_translator dut (.*);

  // models
  logic [27:0] kv [W], kc [W];
  logic [27:0] ram [W];
  logic        ent [W];

  function automatic logic [7:0] hec_of(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  function automatic int cam_lookup(input logic [27:0] k);
    for (int i = 0; i < W; i++) if (ent[i] && ((kc[i] & (kv[i] ^ k)) == '0)) return i;
    return -1;
  endfunction

  always @(posedge clk) begin
    int a;
    cam_r_valid <= cam_s_valid && cam_s_ready;
    a = cam_lookup(cam_key);
    cam_r_hit  <= (a >= 0);
    cam_r_addr <= (a >= 0) ? 4'(a) : 4'd0;
    if (ram_re) ram_rdata <= ram[ram_raddr];
  end

  // expected outputs
  typedef struct { logic [39:0] hdr; logic hit; logic hec_err; int due; } exp_t;
  exp_t q [$];
  int cycle = 0;
  int n_hit = 0, n_miss = 0, n_bad = 0, n_stall = 0, n_out = 0, n_vp = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid && !in_ready) n_stall++;
    if (rst_n && in_valid && in_ready) begin
      exp_t e;
      logic [11:0] vpi;
      logic [15:0] vci;
      int a;
      e.due = cycle + 3;
      e.hdr = in_hdr;
      e.hit = 1'b0;
      e.hec_err = (hec_of(in_hdr[39:8]) != in_hdr[7:0]);
      vpi = nni ? in_hdr[39:28] : {4'h0, in_hdr[35:28]};
      vci = in_hdr[27:12];
      a = cam_lookup({vpi, vci});
      if (!e.hec_err && a >= 0) begin
        logic [39:0] h;
        h = in_hdr;
        if (nni) h[39:28] = ram[a][27:16];
        else     h[35:28] = ram[a][23:16];
        h[27:12] = ram[a][15:0];
        h[7:0] = hec_of(h[39:8]);
        e.hdr = h;
        e.hit = 1'b1;
        if (kc[a][15:0] == '0) n_vp++;
      end
      if (e.hec_err) n_bad++;
      else if (e.hit) n_hit++;
      else n_miss++;
      q.push_back(e);
    end
    if (rst_n && out_valid) begin
      exp_t e;
      n_out++;
      chk(q.size() > 0, "output without input");
      if (q.size() > 0) begin
        e = q.pop_front();
        chk(cycle == e.due, $sformatf("latency: out at %0d, due %0d", cycle, e.due));
        chk(out_hdr == e.hdr && out_hit == e.hit && out_hec_err == e.hec_err,
            $sformatf("hdr %h hit %b bad %b, exp %h %b %b", out_hdr, out_hit, out_hec_err, e.hdr, e.hit, e.hec_err));
      end
    end
  end

  function automatic logic [39:0] make_hdr(input logic [11:0] vpi, input logic [15:0] vci, input bit is_nni);
    logic [39:0] h;
    h = {4'($urandom), 8'($urandom), vci, 3'($urandom), 1'($urandom), 8'h00};
    if (is_nni) h[39:28] = vpi;
    else        h[35:28] = vpi[7:0];
    h[7:0] = hec_of(h[39:8]);
    return h;
  endfunction

  initial begin
    nni = 0; in_valid = 0; in_hdr = 0; cam_s_ready = 1;
    cam_r_valid = 0; cam_r_hit = 0; cam_r_addr = 0; ram_rdata = 0;
    for (int i = 0; i < W; i++) begin
      ent[i] = 1'b1;
      kv[i] = {4'h0, 8'(i * 3 + 1), 16'(16'h0100 + i * 5)};
      kc[i] = '1;
      ram[i] = 28'($urandom);
    end
    // entry 15: a whole virtual path, VCI don't care
    kv[15] = {12'h0AA, 16'h0000};
    kc[15] = {12'hFFF, 16'h0000};
    ent[14] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      @(negedge clk);
      nni = phase[0];
      for (int n = 0; n < 600; n++) begin
        int a, kind;
        logic [39:0] h;
        kind = $urandom % 10;
        a = $urandom % 15;
        if (kind < 6)      h = make_hdr(kv[a][27:16], kv[a][15:0], nni);
        else if (kind < 8) h = make_hdr(12'h0AA, 16'($urandom), nni);
        else               h = make_hdr(12'($urandom), 16'($urandom), nni);
        if (kind == 9) h[7:0] = h[7:0] ^ 8'h01;
        in_valid = 1; in_hdr = h;
        cam_s_ready = ($urandom % 8 != 0);
        @(posedge clk);
        while (!in_ready) begin
          @(negedge clk); cam_s_ready = ($urandom % 8 != 0);
          @(posedge clk);
        end
        @(negedge clk);
      end
      in_valid = 0;
      cam_s_ready = 1;
      repeat (6) @(negedge clk);
    end
    chk(q.size() == 0, "every cell came out");
    chk(n_hit > 0 && n_miss > 0 && n_bad > 0 && n_stall > 0 && n_vp > 0,
        $sformatf("all cases seen: hit %0d miss %0d bad-hec %0d stall %0d vp %0d", n_hit, n_miss, n_bad, n_stall, n_vp));
    $display("EVENT hit=%0d miss=%0d bad_hec=%0d stall_cycles=%0d vp_switched=%0d out=%0d", n_hit, n_miss, n_bad, n_stall, n_vp, n_out);
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
