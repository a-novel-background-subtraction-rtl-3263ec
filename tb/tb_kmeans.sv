// tb_kmeans: runs the k-means stage on random and clustered histories held
// in a memory model and compares centres, valid flags, cluster counts and
// the number of passes with an integer reference of the same procedure
// (spread seeding between min and max, nearest-centre assignment with ties
// to the lower index, centre = floor(256*sum/count), stop when no centre
// moves or after MAX_ITERS passes, then merging of neighbouring clusters
// whose samples leave a gap of at most MERGE_GAP levels).
`timescale 1ns/1ps
module tb_kmeans;
  import bsps_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [6:0] rd_addr;
  pixel_t rd_data;
  logic [15:0] centers [K_MAX];
  logic [K_MAX-1:0] cvalid;
  logic [7:0] counts [K_MAX];
  logic [7:0] iters;
  kmeans dut (.*);

  int checks = 0, failures = 0, n_drop = 0, n_maxit = 0, n_merge = 0;
  int h [128];
  always @(posedge clk) rd_data <= 8'(h[rd_addr]);

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one();
    int mn = 255, mx = 0, c [K_MAX], cnt [K_MAX], sm [K_MAX], it, lo [K_MAX], hi [K_MAX], anc;
    bit v [K_MAX], ch;
    for (int i = 0; i < 100; i++) begin
      if (h[i] < mn) mn = h[i];
      if (h[i] > mx) mx = h[i];
    end
    for (int k = 0; k < K_MAX; k++) begin
      c[k] = mn * 256 + ((mx - mn) * 256 * (2 * k + 1)) / (2 * K_MAX);
      v[k] = 1;
    end
    it = 0;
    do begin
      for (int k = 0; k < K_MAX; k++) begin cnt[k] = 0; sm[k] = 0; lo[k] = 255; hi[k] = 0; end
      for (int i = 0; i < 100; i++) begin
        int b = -1, bd = 1 << 30, dd;
        for (int k = 0; k < K_MAX; k++) if (v[k]) begin
          dd = h[i] * 256 - c[k]; if (dd < 0) dd = -dd;
          if (dd < bd) begin bd = dd; b = k; end
        end
        cnt[b]++; sm[b] += h[i];
        if (h[i] < lo[b]) lo[b] = h[i];
        if (h[i] > hi[b]) hi[b] = h[i];
      end
      ch = 0;
      for (int k = 0; k < K_MAX; k++) begin
        if (cnt[k] == 0) begin if (v[k]) ch = 1; v[k] = 0; end
        else begin
          if (sm[k] * 256 / cnt[k] != c[k]) ch = 1;
          c[k] = sm[k] * 256 / cnt[k];
        end
      end
      it++;
    end while (ch && it < 10);
    // merge neighbouring clusters separated by a gap of at most 2 levels
    anc = -1;
    for (int k = 0; k < K_MAX; k++) if (v[k]) begin
      if (anc >= 0 && lo[k] - hi[anc] <= 2) begin
        sm[anc] += sm[k]; cnt[anc] += cnt[k]; hi[anc] = hi[k]; v[k] = 0;
        c[anc] = sm[anc] * 256 / cnt[anc];
        n_merge++;
      end else anc = k;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(iters == 8'(it), $sformatf("passes %0d expected %0d", iters, it));
    for (int k = 0; k < K_MAX; k++) begin
      check(cvalid[k] == v[k], $sformatf("cvalid[%0d]", k));
      if (v[k]) begin
        check(centers[k] == 16'(c[k]), $sformatf("centre[%0d] %0d expected %0d", k, centers[k], c[k]));
        check(counts[k] == 8'(cnt[k]), $sformatf("count[%0d]", k));
      end else n_drop++;
    end
    if (it == 10) n_maxit++;
  endtask

  initial begin
    start = 0;
    for (int i = 0; i < 128; i++) h[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int nc = $urandom_range(1, 5);
      int cc [5];
      for (int j = 0; j < 5; j++) cc[j] = $urandom_range(0, 255);
      for (int i = 0; i < 100; i++) begin
        int v = cc[$urandom_range(0, nc - 1)] + $urandom_range(0, 20) - 10;
        if (t % 4 == 3) v = $urandom_range(0, 255);
        h[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
      one();
    end
    $display("dropped clusters=%0d merges=%0d runs stopped by the pass limit=%0d", n_drop, n_merge, n_maxit);
    check(n_drop > 0, "an empty cluster was dropped");
    check(n_merge > 0, "neighbouring clusters were merged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
