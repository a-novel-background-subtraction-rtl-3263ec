// tb_em_estimator: drives the EM stage directly with a history memory model
// and chosen seed centres (including a seed between two clusters and an
// invalid seed) and checks the fitted mixture against the statistics of the
// generated clusters. Also checks that an invalid seed never yields a
// component.
`timescale 1ns/1ps
module tb_em_estimator;
  import bsps_pkg::*;
  import hist_gen_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [15:0] centers [K_MAX];
  logic [K_MAX-1:0] cvalid;
  logic [6:0] rd_addr;
  pixel_t rd_data;
  gmm_t gmm;
  em_estimator dut (.*);

  int checks = 0, failures = 0;
  int h [$], lab [$];
  always @(posedge clk) rd_data <= 8'(h[rd_addr]);

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(scene_t s, int c0, int c1, int c2, int c3, logic [3:0] v);
    gen(s, 100, h, lab);
    centers[0] = 16'(c0 * 256); centers[1] = 16'(c1 * 256);
    centers[2] = 16'(c2 * 256); centers[3] = 16'(c3 * 256);
    cvalid = v;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int k = 0; k < K_MAX; k++)
      $display("  w=%6.4f mu=%7.3f sigma=%6.3f", real'(gmm[k].w) / 32768.0,
               real'(gmm[k].mu) / 256.0, real'(gmm[k].sigma) / 256.0);
    failures += check_fit(s, h, lab, gmm, checks);
    for (int k = 0; k < K_MAX; k++) if (!v[k]) begin
      checks++;
      if (gmm[k].w != 0) begin failures++; $display("FAIL: invalid seed %0d became a component", k); end
    end
  endtask

  initial begin
    scene_t s;
    start = 0; cvalid = '0;
    for (int k = 0; k < K_MAX; k++) centers[k] = '0;
    h.delete(); for (int i = 0; i < 128; i++) h.push_back(0);
    repeat (2) @(posedge clk); rst_n = 1;
    s.n_cl = 2; s.centre = '{60, 200, 0, 0}; s.half = '{4, 2, 0, 0};
    one(s, 50, 130, 210, 0, 4'b0111);
    s.n_cl = 3; s.centre = '{30, 90, 160, 0}; s.half = '{3, 3, 8, 0};
    one(s, 25, 95, 150, 170, 4'b1111);
    s.n_cl = 2; s.centre = '{100, 140, 0, 0}; s.half = '{5, 5, 0, 0};
    one(s, 0, 95, 0, 145, 4'b1010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
