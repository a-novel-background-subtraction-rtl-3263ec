// tb_bsps_16core: the large configuration, 16 cores, here with two model
// estimation units. Both MEUs build mixtures at the same time for two-mode
// histories (checked against the history statistics); then one 320x240 frame
// streams through the 16 cores at full speed, every result word is compared
// with the integer reference model, and the frame rate at 222 MHz must reach
// the 112.61 frames/s reported for the 16-core system. Counts batches of 16
// and the cycles in which both MEUs were busy together.
`timescale 1ns/1ps
module tb_bsps_16core;
  import bsps_pkg::*;
  import bsu_ref_pkg::*;
  import hist_gen_pkg::*;

  localparam int NC = 16, NM = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   ld_valid, ld_ready, ld_batch_done, wb_valid, wb_ready;
  word_t  ld_word, wb_word;
  logic   [NM-1:0] hist_valid, hist_ready, model_valid, model_ready, meu_busy;
  pixel_t [NM-1:0] hist_pixel;
  gmm_t   [NM-1:0] model_gmm;

  bsps_top #(.N_CORES(NC), .N_MEU(NM)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, n_batch = 0, both_busy = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && ld_batch_done) n_batch++;
    if (meu_busy == '1) both_busy++;
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic estimate(int m, scene_t s);
    int h [$], lab [$];
    gen(s, 100, h, lab);
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      hist_valid[m] = 1; hist_pixel[m] = 8'(h[i]);
      while (!hist_ready[m]) @(negedge clk);
      @(posedge clk); #1 hist_valid[m] = 0;
    end
    while (!model_valid[m]) @(negedge clk);
    failures += check_fit(s, h, lab, model_gmm[m], checks);
    model_ready[m] = 1;
    @(posedge clk); #1 model_ready[m] = 0;
  endtask

  ref_res_t expq [$];
  initial begin
    wb_ready = 1;
    forever begin
      @(negedge clk); #1;
      if (wb_valid) begin
        ref_res_t r;
        if (expq.size() == 0) check(0, "unexpected write-back");
        else begin
          r = expq.pop_front();
          check(wb_word.fg == r.fg && wb_word.fit == r.fit && wb_word.gmm == r.gmm, "result word");
        end
      end
    end
  end

  initial begin
    scene_t s0, s1;
    gmm_t g;
    int t0, cyc;
    ld_valid = 0; ld_word = '0; hist_valid = '0; hist_pixel = '0; model_ready = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    s0.n_cl = 2; s0.centre = '{50, 120, 0, 0}; s0.half = '{3, 2, 0, 0};
    s1.n_cl = 2; s1.centre = '{90, 200, 0, 0}; s1.half = '{2, 4, 0, 0};
    fork
      estimate(0, s0);
      estimate(1, s1);
    join
    check(both_busy > 1000, "both MEUs worked at the same time");
    // one 320x240 frame, 16 cores
    @(posedge clk); #1;
    t0 = cycle;
    for (int i = 0; i < 320 * 240; i++) begin
      int v;
      g = '0;
      g[0].w = 16'd28672; g[0].mu = 16'((60 + i % 50) * 256); g[0].sigma = 16'h0180;
      g[2].w = 16'd4096;  g[2].mu = 16'((100 + i % 50) * 256); g[2].sigma = 16'h0300;
      v = 60 + i % 50 + $urandom_range(0, 4) - 2;
      if (i % 97 == 0) v = 250;
      expq.push_back(bsu_step(v, g, 7, 40, 29491, 16'h0800, 16'h0080));
      ld_word = '0; ld_word.pixel = 8'(v); ld_word.gmm = g;
      ld_valid = 1;
      @(negedge clk);
      while (!ld_ready) @(negedge clk);
      @(posedge clk); #1;
    end
    ld_valid = 0;
    while (expq.size() != 0) @(negedge clk);
    cyc = cycle - t0;
    $display("320x240 on 16 cores: %0d cycles, %0.1f frames/s at 222 MHz (reported 112.61)",
             cyc, 222.0e6 / cyc);
    check(222.0e6 / cyc >= 112.61, "16-core frame rate");
    check(n_batch == 320 * 240 / NC, "batches of 16 pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
