// bsu_ref_pkg: reference model of one background subtraction step, written
// with plain integer arithmetic for the testbenches. It implements the rules
// listed in the header of bsu.sv (closest component by |x-mu|/sigma, fit test
// against LAMBDA, weight decay with renormalisation, running mean/variance
// update, new component in a free or lowest-weight slot, background when
// the heavier components weigh less than BG_T together).
package bsu_ref_pkg;
  import bsps_pkg::*;

  typedef struct {
    bit   fg;
    bit   fit;
    bit   replaced_used;   // a new component overwrote a used slot
    gmm_t gmm;
  } ref_res_t;

  function automatic longint isqrt_ref(longint v);
    longint r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // floor division by 2^s for signed values
  function automatic longint asr(longint v, int s);
    longint p;
    p = longint'(1) << s;
    if (v >= 0) return v / p;
    return -((-v + p - 1) / p);
  endfunction

  function automatic ref_res_t bsu_step(int x, gmm_t g, int alpha_sh, int lambda_q4,
                                        int bg_t, int sigma_init, int sigma_min);
    ref_res_t r;
    longint xq, dst[K_MAX];
    int best, t, nfree;
    longint sum, v, v2, s;
    bit any;
    xq = longint'(x) * 256;
    any = 0; best = 0;
    for (int k = 0; k < K_MAX; k++) begin
      dst[k] = xq - longint'(g[k].mu);
      if (dst[k] < 0) dst[k] = -dst[k];
    end
    for (int k = 0; k < K_MAX; k++)
      if (g[k].w != 0)
        if (!any || dst[k] * g[best].sigma < dst[best] * g[k].sigma) begin
          best = k; any = 1;
        end else any = 1;
    r.fit = any && (dst[best] * 16 < longint'(lambda_q4) * g[best].sigma);
    sum = 0;
    for (int k = 0; k < K_MAX; k++) if (g[k].w > g[best].w) sum += g[k].w;
    r.fg  = !(r.fit && sum < bg_t);
    nfree = -1;
    for (int k = K_MAX - 1; k >= 0; k--) if (g[k].w == 0) nfree = k;
    if (r.fit) t = best;
    else if (nfree >= 0) t = nfree;
    else begin
      t = 0;
      for (int k = 1; k < K_MAX; k++) if (g[k].w < g[t].w) t = k;
    end
    r.replaced_used = !r.fit && nfree < 0;
    r.gmm = g;
    sum = 0;
    for (int k = 0; k < K_MAX; k++)
      if (k != t) begin
        r.gmm[k].w = 16'(g[k].w - (g[k].w >> alpha_sh));
        sum += r.gmm[k].w;
      end
    r.gmm[t].w = (sum >= 32768) ? 16'd1 : 16'(32768 - sum);
    if (r.fit) begin
      r.gmm[t].mu = 16'(longint'(g[t].mu) + asr(xq - longint'(g[t].mu), alpha_sh));
      v  = longint'(g[t].sigma) * g[t].sigma;
      v2 = dst[t] * dst[t];
      v  = v + asr(v2 - v, alpha_sh);
      s  = isqrt_ref(v);
      if (s < sigma_min) s = sigma_min;
      r.gmm[t].sigma = 16'(s);
    end else begin
      r.gmm[t].mu    = 16'(xq);
      r.gmm[t].sigma = 16'(sigma_init);
    end
    return r;
  endfunction
endpackage
