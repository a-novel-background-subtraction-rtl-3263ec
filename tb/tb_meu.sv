// tb_meu: end-to-end test of the model estimation unit. Streams pixel
// histories of 1, 2 and 3 well separated clusters (with input gaps), lets
// the unit build a mixture for each, and checks each mixture against the
// statistics of the generated clusters, and that the number of components
// equals the number of clusters (superfluous k-means seeds dropped or merged).
`timescale 1ns/1ps
module tb_meu;
  import bsps_pkg::*;
  import hist_gen_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hist_valid, hist_ready, model_valid, model_ready, busy;
  pixel_t hist_pixel;
  gmm_t model_gmm;
  meu dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(scene_t s, int exp_comps);
    int h [$], lab [$], t0, nc;
    gen(s, 100, h, lab);
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      hist_valid = ($urandom_range(0, 3) != 0);
      while (!hist_valid) begin @(negedge clk); hist_valid = 1; end
      hist_pixel = 8'(h[i]);
      while (!hist_ready) @(negedge clk);
      @(posedge clk); #1 hist_valid = 0;
    end
    t0 = cycle;
    while (!model_valid) @(negedge clk);
    $display("model after %0d cycles", cycle - t0);
    for (int k = 0; k < K_MAX; k++)
      $display("  w=%6.4f mu=%7.3f sigma=%6.3f", real'(model_gmm[k].w) / 32768.0,
               real'(model_gmm[k].mu) / 256.0, real'(model_gmm[k].sigma) / 256.0);
    failures += check_fit(s, h, lab, model_gmm, checks);
    nc = 0;
    for (int k = 0; k < K_MAX; k++) if (model_gmm[k].w != 0) nc++;
    if (exp_comps > 0) begin
      checks++;
      if (nc != exp_comps) begin failures++; $display("FAIL: %0d components, expected %0d", nc, exp_comps); end
    end
    model_ready = 1;
    @(posedge clk); #1 model_ready = 0;
  endtask

  initial begin
    scene_t s;
    hist_valid = 0; hist_pixel = '0; model_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    s.n_cl = 2; s.centre = '{40, 180, 0, 0}; s.half = '{3, 4, 0, 0};
    one(s, 2);
    s.n_cl = 1; s.centre = '{120, 0, 0, 0}; s.half = '{5, 0, 0, 0};
    one(s, 1);
    s.n_cl = 3; s.centre = '{20, 110, 230, 0}; s.half = '{2, 6, 3, 0};
    one(s, 3);
    s.n_cl = 1; s.centre = '{77, 0, 0, 0}; s.half = '{0, 0, 0, 0};
    one(s, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
