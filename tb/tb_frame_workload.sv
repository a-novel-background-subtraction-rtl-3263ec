// tb_frame_workload: the two frame sizes of the reported measurements,
// 320x240 and 640x480, one frame each, through the system at its default
// 4 cores. Each location starts from a mixture with one or two background
// modes; the frame holds a gradient background with noise and a hot object.
// The load bus delivers a word whenever it is accepted and write-back never
// stalls, so the cycle count is the system's own. Every write-back word is
// compared with the integer reference model. The frame rates the cycle
// counts give at 210 MHz must reach the reported 28.15 frames/s (320x240)
// and 7.04 frames/s (640x480) of the 4-core system; the memory traffic of
// 25 frames/s at 640x480 (one 256-bit word read and one written per pixel)
// is printed for comparison with the quoted 250 MB/s of reads.
`timescale 1ns/1ps
module tb_frame_workload;
  import bsps_pkg::*;
  import bsu_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   ld_valid, ld_ready, ld_batch_done, wb_valid, wb_ready;
  word_t  ld_word, wb_word;
  logic   hist_valid, hist_ready, model_valid, model_ready, meu_busy;
  pixel_t hist_pixel;
  gmm_t   model_gmm;

  bsps_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int n_fg = 0, n_bg = 0;

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  ref_res_t expq [$];

  function automatic int bgval(int x, int y);
    return 40 + (x * 80) / 640 + (y * 40) / 480;
  endfunction

  function automatic gmm_t model_of(int x, int y);
    gmm_t g = '0;
    g[0].w = 16'd24576; g[0].mu = 16'(bgval(x, y) * 256); g[0].sigma = 16'h0200;
    g[1].w = 16'd8192;  g[1].mu = 16'((bgval(x, y) + 30) * 256); g[1].sigma = 16'h0300;
    return g;
  endfunction

  // consumer: always ready, compares in order
  initial begin
    wb_ready = 1;
    forever begin
      @(negedge clk); #1;
      if (wb_valid) begin
        ref_res_t r;
        if (expq.size() == 0) check(0, "unexpected write-back");
        else begin
          r = expq.pop_front();
          checks++;
          if (wb_word.fg != r.fg || wb_word.fit != r.fit || wb_word.gmm != r.gmm) begin
            failures++;
            if (failures < 4) $display("FAIL: result mismatch px=%0d fg %0d/%0d fit %0d/%0d\n got %h\n exp %h", wb_word.pixel, wb_word.fg, r.fg, wb_word.fit, r.fit, wb_word.gmm, r.gmm);
          end
          if (r.fg) n_fg++; else n_bg++;
        end
      end
    end
  end

  task automatic frame(int w, int h, real fps_reported);
    int t0, cyc, n;
    real fps;
    n = 0;
    @(posedge clk); #1;
    t0 = cycle;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int v, sx, sy;
        sx = x * 640 / w; sy = y * 480 / h;
        v = bgval(sx, sy) + $urandom_range(0, 4) - 2;
        if ((x + y) % 11 == 0) v += 30;                          // second mode
        if (sx > 300 && sx < 360 && sy > 200 && sy < 300) v = 200;  // hot object
        expq.push_back(bsu_step(v, model_of(sx, sy), 7, 40, 29491, 16'h0800, 16'h0080));
        ld_word = '0; ld_word.pixel = 8'(v); ld_word.gmm = model_of(sx, sy);
        ld_valid = 1;
        @(negedge clk);
        while (!ld_ready) @(negedge clk);
        @(posedge clk); #1;
        n++;
      end
    ld_valid = 0;
    while (expq.size() != 0) @(negedge clk);
    cyc = cycle - t0;
    fps = 210.0e6 / cyc;
    $display("%0dx%0d: %0d cycles, %0.1f frames/s at 210 MHz (reported %0.2f), %0.2f cycles per pixel and core",
             w, h, cyc, fps, fps_reported, real'(cyc) * 4 / n);
    check(fps >= fps_reported, $sformatf("%0dx%0d frame rate", w, h));
  endtask

  initial begin
    ld_valid = 0; ld_word = '0; hist_valid = 0; hist_pixel = '0; model_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    frame(320, 240, 28.15);
    frame(640, 480, 7.04);
    $display("640x480 at 25 frames/s: %0.1f MB/s read, %0.1f MB/s written",
             640.0 * 480 * 25 * 32 / 1.0e6, 640.0 * 480 * 25 * 32 / 1.0e6);
    $display("background=%0d foreground=%0d", n_bg, n_fg);
    check(n_fg > 0 && n_bg > 0, "both classes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
