// hist_gen_pkg: test data and checks for the model estimation testbenches.
// Generates pixel histories drawn from well separated clusters (uniform
// noise of a chosen half-width around each cluster centre) and checks a
// fitted mixture against the plain statistics of each cluster: the
// components lying in a cluster must together carry its share of samples,
// its mean and its variance, and no component may lie outside every cluster.
package hist_gen_pkg;
  import bsps_pkg::*;

  typedef struct {
    int n_cl;
    int centre [4];
    int half   [4];
  } scene_t;

  function automatic void gen(scene_t s, int n, ref int h [$], ref int lab [$]);
    h.delete(); lab.delete();
    for (int i = 0; i < n; i++) begin
      int c, v;
      c = (i * 7 + $urandom_range(0, 2)) % s.n_cl;
      v = s.centre[c] + $urandom_range(0, 2 * s.half[c]) - s.half[c];
      h.push_back(v); lab.push_back(c);
    end
  endfunction

  // returns the number of failed checks, adds the number made to checks
  function automatic int check_fit(scene_t s, int h [$], int lab [$], gmm_t g,
                                   ref int checks);
    int fails = 0;
    real wt = 0;
    for (int k = 0; k < K_MAX; k++) wt += real'(g[k].w) / 32768.0;
    checks++;
    if (wt < 0.98 || wt > 1.02) begin fails++; $display("FAIL: weights sum %f", wt); end
    for (int k = 0; k < K_MAX; k++) if (g[k].w != 0) begin
      bit in_cl = 0;
      real m = real'(g[k].mu) / 256.0;
      for (int c = 0; c < s.n_cl; c++)
        if (m >= s.centre[c] - s.half[c] - 1 && m <= s.centre[c] + s.half[c] + 1) in_cl = 1;
      checks++;
      if (!in_cl) begin fails++; $display("FAIL: component %0d at %f outside clusters", k, m); end
    end
    for (int c = 0; c < s.n_cl; c++) begin
      real n = 0, sm = 0, sq = 0, mean, vr, gw = 0, gm = 0, g2 = 0, mm, mv;
      for (int i = 0; i < h.size(); i++) if (lab[i] == c) begin
        n += 1; sm += h[i]; sq += real'(h[i]) * h[i];
      end
      mean = sm / n; vr = sq / n - mean * mean;
      for (int k = 0; k < K_MAX; k++) if (g[k].w != 0) begin
        real m = real'(g[k].mu) / 256.0, sd = real'(g[k].sigma) / 256.0, w = real'(g[k].w) / 32768.0;
        if (m >= s.centre[c] - s.half[c] - 1 && m <= s.centre[c] + s.half[c] + 1) begin
          gw += w; gm += w * m; g2 += w * (sd * sd + m * m);
        end
      end
      checks += 3;
      if (gw == 0) begin fails += 3; $display("FAIL: cluster %0d has no component", c); continue; end
      mm = gm / gw; mv = g2 / gw - mm * mm;
      if (gw < n / h.size() - 0.03 || gw > n / h.size() + 0.03) begin
        fails++; $display("FAIL: cluster %0d weight %f expected %f", c, gw, n / h.size());
      end
      if (mm < mean - 0.5 || mm > mean + 0.5) begin
        fails++; $display("FAIL: cluster %0d mean %f expected %f", c, mm, mean);
      end
      if (mv < 0.75 * vr - 0.3 || mv > 1.25 * vr + 0.3) begin
        fails++; $display("FAIL: cluster %0d variance %f expected %f (mean %f exp %f n %f)", c, mv, vr, mm, mean, n);
      end
    end
    return fails;
  endfunction
endpackage
