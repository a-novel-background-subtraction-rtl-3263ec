// tb_bsu: self-checking testbench of the background subtraction core.
// Drives directed cases (empty model, clear background, clear foreground,
// low-weight match, full model forcing replacement) and random mixtures,
// compares every result word with the integer reference model, applies random
// output back-pressure, and checks the per-pixel cycle count: fits take
// 20 cycles from input handshake to output, new components 2, both far below
// the ~389 cycles per pixel and core implied by the reported 28.15 frames/s
// at 320x240 with 4 cores at 210 MHz.
`timescale 1ns/1ps
module tb_bsu;
  import bsps_pkg::*;
  import bsu_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  word_t in_word, out_word;

  bsu dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int n_fit = 0, n_new = 0, n_repl = 0, n_bg = 0, n_fg = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic comp_t mk(int w, int mu, int sg);
    comp_t c;
    c.w = 16'(w); c.mu = 16'(mu); c.sigma = 16'(sg);
    return c;
  endfunction

  task automatic run(int x, gmm_t g, bit bp);
    ref_res_t r;
    int t0, lat;
    r = bsu_step(x, g, 7, 40, 29491, 16'h0800, 16'h0080);
    in_word = '0; in_word.pixel = 8'(x); in_word.gmm = g;
    @(negedge clk);
    in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    t0 = cycle;
    #1 in_valid = 0;
    out_ready = !bp;
    @(negedge clk);
    while (!out_valid) @(negedge clk);
    lat = cycle - t0;
    if (bp) begin
      repeat ($urandom_range(1, 4)) @(negedge clk);
      out_ready = 1;
    end
    check(out_word.fg == r.fg, $sformatf("fg x=%0d exp %0d got %0d", x, r.fg, out_word.fg));
    check(out_word.fit == r.fit, $sformatf("fit x=%0d", x));
    check(out_word.pixel == 8'(x), "pixel passthrough");
    check(out_word.gmm == r.gmm, $sformatf("gmm x=%0d exp %h got %h", x, r.gmm, out_word.gmm));
    check(lat == (r.fit ? 20 : 2), $sformatf("latency %0d fit=%0d", lat, r.fit));
    check(lat + 1 <= 388, "cycles per pixel within the reported rate");
    if (r.fit) n_fit++; else n_new++;
    if (r.replaced_used) n_repl++;
    if (r.fg) n_fg++; else n_bg++;
    @(posedge clk);
    #1 out_ready = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gmm_t g;
    in_valid = 0; out_ready = 0; in_word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // empty model: first component created
    g = '0;
    run(100, g, 0);
    // one dominant component at 100: background
    g = '0; g[0] = mk(32768, 100 * 256, 4 * 256);
    run(102, g, 0);
    // far away pixel: foreground, new component in a free slot
    run(200, g, 1);
    // match on a low-weight component: foreground although it fits
    g = '0; g[0] = mk(30000, 50 * 256, 3 * 256); g[2] = mk(2768, 150 * 256, 5 * 256);
    run(151, g, 0);
    // full model, no fit: smallest weight replaced
    g[1] = mk(1000, 10 * 256, 256); g[3] = mk(500, 240 * 256, 256);
    g[0].w = 29000; g[2].w = 2268;
    run(100, g, 0);
    // closest by Mahalanobis distance, not by absolute distance
    g = '0; g[0] = mk(16384, 100 * 256, 1 * 256); g[1] = mk(16384, 110 * 256, 10 * 256);
    run(104, g, 0);
    // random mixtures
    for (int i = 0; i < 400; i++) begin
      int kn, tot, wk;
      g = '0;
      kn = $urandom_range(0, K_MAX);
      tot = 32768;
      for (int k = 0; k < kn; k++) begin
        wk = (k == kn - 1) ? tot : $urandom_range(1, tot - (kn - 1 - k));
        tot -= wk;
        g[k] = mk(wk, $urandom_range(0, 65535), $urandom_range(128, 20 * 256));
      end
      run($urandom_range(0, 255), g, $urandom_range(0, 1));
    end
    $display("fit=%0d new=%0d replaced=%0d bg=%0d fg=%0d", n_fit, n_new, n_repl, n_bg, n_fg);
    check(n_fit > 0 && n_new > 0 && n_repl > 0 && n_bg > 0 && n_fg > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
