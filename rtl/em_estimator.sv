// em_estimator: Expectation-Maximization fit of the pixel's Gaussian mixture
// (second stage of the MEU).
//
// Starts from the k-means centres and refines weight, mean and standard
// deviation of every component over the N_HIST history samples.
//   pass 0    : hard E-step, each sample belongs wholly to its nearest centre
//               (this turns the centres into a first full mixture)
//   passes 1..EM_ITERS, soft E-step per sample x and component k:
//               z_k = (x-mu_k)^2 / (2 var_k), p_k = (w_k/sigma_k) exp(-z_k),
//               r_k = p_k / sum_j p_j (if every p_k underflows, the sample
//               goes wholly to the component with the smallest z_k)
//   M-step    : N_k = sum r_k, mu_k = sum r_k x / N_k,
//               var_k = sum r_k x^2 / N_k - mu_k^2 (at least SIGMA_MIN^2,
//               mu_k taken with 16 fraction bits here),
//               sigma_k = sqrt(var_k), w_k = N_k / N_HIST; a component whose
//               weight falls below W_MIN is dropped, then the remaining
//               weights are renormalised to 1.0.
// The E-step / M-step alternation seeded by k-means and the three output
// parameters follow the system description. The fixed-point formats, the
// exp() approximation (see bsps_pkg::exp_neg_q), the pruning rule that
// settles the number of components, and the iteration count are this
// design's choice. All divisions share one 64-bit sequential divider and all
// square roots one sequential root unit: about 1100 cycles per sample and
// soft pass with four components, speed being of no concern for a unit that
// only runs at initialisation.
// Interface: pulse start with centers/cvalid stable; the block reads the
// history through rd_addr / rd_data (one cycle read latency); done pulses
// when gmm (unused slots have weight 0) is valid; it holds until next start.
module em_estimator
  import bsps_pkg::*;
#(
  parameter int          N_HIST    = 100,
  parameter int          EM_ITERS  = 5,
  parameter logic [15:0] W_MIN     = 16'd1638,   // 0.05 in Q1.15
  parameter logic [15:0] SIGMA_MIN = 16'h0080,   // 0.5 in Q8.8
  localparam int         AW        = $clog2(N_HIST)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       centers [K_MAX],
  input  logic [K_MAX-1:0]  cvalid,
  output logic              busy,
  output logic              done,
  output logic [AW-1:0]     rd_addr,
  input  pixel_t            rd_data,
  output gmm_t              gmm
);
  typedef enum logic [4:0] {
    S_IDLE, S_RD, S_RDW, S_X, S_ZK, S_ZW, S_NORM, S_RK, S_RW, S_ACC,
    S_M1, S_M1W, S_M2W, S_SQW, S_WW, S_NRM0, S_NRM, S_NRMW, S_CW, S_ITER
  } state_t;
  state_t state;

  logic [K_MAX-1:0] valid;
  logic [15:0] w [K_MAX], mu [K_MAX], sg [K_MAX];
  logic [31:0] vr [K_MAX];              // variance, Q16.16
  logic [31:0] c  [K_MAX];              // w/sigma * 2^23
  logic [31:0] nk [K_MAX];              // sum of responsibilities, Q.16
  logic [39:0] s1 [K_MAX];              // sum r*x
  logic [47:0] s2 [K_MAX];              // sum r*x^2
  logic [31:0] p  [K_MAX];
  logic [16:0] r  [K_MAX];              // responsibility, 65536 = 1.0
  logic [35:0] psum;
  logic [31:0] zmin;
  int unsigned kz;                      // component with the smallest z
  logic [AW:0] i;
  int unsigned k;
  logic [7:0]  it;
  pixel_t      x;
  logic [16:0] wsum;
  logic [23:0] mu_hi;                   // mean with 16 fraction bits

  // divider and square root shared by all steps
  logic        d_start, d_busy, d_done;
  logic [63:0] d_a, d_b, d_q, d_r;
  seq_div #(.W(64)) u_div (
    .clk, .rst_n, .start(d_start), .dividend(d_a), .divisor(d_b),
    .busy(d_busy), .done(d_done), .quotient(d_q), .remainder(d_r)
  );
  logic        q_start, q_busy, q_done;
  logic [31:0] q_in;
  logic [15:0] q_root;
  isqrt #(.OUT_W(16)) u_sqrt (
    .clk, .rst_n, .start(q_start), .radicand(q_in),
    .busy(q_busy), .done(q_done), .root(q_root)
  );

  // helpers on the current sample / component
  logic [15:0] xq, dk;
  logic [31:0] d2k, mu2k, m2k, vark;
  logic [16:0] ek;
  int unsigned near;
  logic [15:0] dn, dj;
  always_comb begin
    xq   = {x, 8'b0};
    dk   = (xq >= mu[k]) ? xq - mu[k] : mu[k] - xq;
    d2k  = 32'(dk) * 32'(dk);
    ek   = exp_neg_q(d_q[31:0]);
    mu2k = 32'((48'(mu_hi) * 48'(mu_hi)) >> 16);
    m2k  = d_q[31:0];
    vark = (m2k > mu2k) ? m2k - mu2k : '0;
    if (vark < 32'(SIGMA_MIN) * 32'(SIGMA_MIN)) vark = 32'(SIGMA_MIN) * 32'(SIGMA_MIN);
    near = 0; dn = '1;
    for (int j = 0; j < K_MAX; j++) begin
      dj = (xq >= mu[j]) ? xq - mu[j] : mu[j] - xq;
      if (valid[j] && dj < dn) begin
        dn = dj;
        near = j;
      end
    end
    wsum = '0;
    for (int j = 0; j < K_MAX; j++) if (valid[j]) wsum = wsum + 17'(w[j]);
  end

  assign busy = (state != S_IDLE);
  always_comb
    for (int j = 0; j < K_MAX; j++) begin
      gmm[j].w     = valid[j] ? w[j]  : '0;
      gmm[j].mu    = valid[j] ? mu[j] : '0;
      gmm[j].sigma = valid[j] ? sg[j] : '0;
    end

  task automatic clear_acc();
    for (int j = 0; j < K_MAX; j++) begin
      nk[j] <= '0; s1[j] <= '0; s2[j] <= '0;
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; valid <= '0; psum <= '0; zmin <= '0; kz <= 0;
      i <= '0; k <= 0; it <= '0; x <= '0; rd_addr <= '0; done <= 1'b0;
      d_start <= 1'b0; d_a <= '0; d_b <= '0; mu_hi <= '0; q_start <= 1'b0; q_in <= '0;
      for (int j = 0; j < K_MAX; j++) begin
        w[j] <= '0; mu[j] <= '0; sg[j] <= '0; vr[j] <= '0; c[j] <= '0;
        nk[j] <= '0; s1[j] <= '0; s2[j] <= '0; p[j] <= '0; r[j] <= '0;
      end
    end else begin
      done <= 1'b0; d_start <= 1'b0; q_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int j = 0; j < K_MAX; j++) mu[j] <= centers[j];
          valid <= cvalid;
          it <= '0; i <= '0;
          clear_acc();
          state <= S_RD;
        end
        // ---------------- E-step ----------------
        S_RD:  begin rd_addr <= i[AW-1:0]; state <= S_RDW; end
        S_RDW: state <= S_X;
        S_X: begin
          x <= rd_data;
          k <= 0; psum <= '0; zmin <= '1; kz <= 0;
          state <= (it == 0) ? S_NORM : S_ZK;
        end
        S_ZK: begin
          if (k == K_MAX) state <= S_NORM;
          else if (!valid[k]) begin
            p[k] <= '0;
            k <= k + 1;
          end else begin
            d_a <= 64'(d2k) << 8;
            d_b <= 64'(vr[k]) << 1;
            d_start <= 1'b1;
            state <= S_ZW;
          end
        end
        S_ZW: if (d_done) begin
          p[k] <= 32'((48'(c[k]) * 48'(ek)) >> 16);
          psum <= psum + 36'((48'(c[k]) * 48'(ek)) >> 16);
          if (d_q[31:0] < zmin) begin
            zmin <= d_q[31:0];
            kz   <= k;
          end
          k <= k + 1;
          state <= S_ZK;
        end
        S_NORM: begin
          k <= 0;
          if (it == 0 || psum == '0) begin
            for (int j = 0; j < K_MAX; j++)
              r[j] <= (j == ((it == 0) ? near : kz)) ? 17'd65536 : '0;
            state <= S_ACC;
          end else begin
            state <= S_RK;
          end
        end
        S_RK: begin
          if (k == K_MAX) state <= S_ACC;
          else if (!valid[k] || p[k] == '0) begin
            r[k] <= '0;
            k <= k + 1;
          end else begin
            d_a <= 64'(p[k]) << 16;
            d_b <= 64'(psum);
            d_start <= 1'b1;
            state <= S_RW;
          end
        end
        S_RW: if (d_done) begin
          r[k] <= d_q[16:0];
          k <= k + 1;
          state <= S_RK;
        end
        S_ACC: begin
          for (int j = 0; j < K_MAX; j++) begin
            nk[j] <= nk[j] + 32'(r[j]);
            s1[j] <= s1[j] + 40'(r[j]) * 40'(x);
            s2[j] <= s2[j] + 48'(r[j]) * 48'(x) * 48'(x);
          end
          if (i == (AW+1)'(N_HIST - 1)) begin
            k <= 0;
            state <= S_M1;
          end else begin
            i <= i + 1'b1;
            state <= S_RD;
          end
        end
        // ---------------- M-step ----------------
        S_M1: begin
          if (k == K_MAX) state <= S_NRM0;
          else if (!valid[k] || nk[k] == '0) begin
            valid[k] <= 1'b0;
            k <= k + 1;
          end else begin
            d_a <= 64'(s1[k]) << 16;
            d_b <= 64'(nk[k]);
            d_start <= 1'b1;
            state <= S_M1W;
          end
        end
        S_M1W: if (d_done) begin
          mu[k] <= d_q[23:8];
          mu_hi <= d_q[23:0];
          d_a <= 64'(s2[k]) << 16;
          d_b <= 64'(nk[k]);
          d_start <= 1'b1;
          state <= S_M2W;
        end
        S_M2W: if (d_done) begin
          vr[k] <= vark;
          q_in <= vark;
          q_start <= 1'b1;
          state <= S_SQW;
        end
        S_SQW: if (q_done) begin
          sg[k] <= (q_root < SIGMA_MIN) ? SIGMA_MIN : q_root;
          d_a <= 64'(nk[k]) << 15;
          d_b <= 64'(N_HIST) << 16;
          d_start <= 1'b1;
          state <= S_WW;
        end
        S_WW: if (d_done) begin
          w[k] <= d_q[15:0];
          if (d_q[15:0] < W_MIN) valid[k] <= 1'b0;
          k <= k + 1;
          state <= S_M1;
        end
        S_NRM0: begin k <= 0; state <= S_NRM; end
        S_NRM: begin
          if (k == K_MAX) state <= S_ITER;
          else if (!valid[k] || wsum == '0) k <= k + 1;
          else begin
            d_a <= 64'(w[k]) << 15;
            d_b <= 64'(wsum);
            d_start <= 1'b1;
            state <= S_NRMW;
          end
        end
        S_NRMW: if (d_done) begin
          w[k] <= (d_q[15:0] == '0) ? 16'd1 : d_q[15:0];
          d_a <= 64'((d_q[15:0] == '0) ? 16'd1 : d_q[15:0]) << 16;
          d_b <= 64'(sg[k]);
          d_start <= 1'b1;
          state <= S_CW;
        end
        S_CW: if (d_done) begin
          c[k] <= d_q[31:0];
          k <= k + 1;
          state <= S_NRM;
        end
        S_ITER: begin
          if (int'(it) == EM_ITERS) begin
            done <= 1'b1;
            state <= S_IDLE;
          end else begin
            it <= it + 1'b1;
            i <= '0;
            clear_acc();
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
