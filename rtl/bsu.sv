// bsu: Background Subtraction Unit, one pixel core of the parallel system.
//
// For every incoming pixel x and the current Gaussian mixture of its location
// the core (1) finds the component closest to x in Mahalanobis distance
// |x - mu| / sigma, (2) decides whether x fits the model (distance below
// LAMBDA), (3) classifies x as background or foreground, and (4) returns the
// updated mixture: if x fits, the closest component is adapted towards x;
// otherwise a new component centred on x is added, in a free slot or in
// place of the component with the smallest weight.
//
// That sequence follows the system description. The exact rules are this
// design's own, of the usual on-line mixture kind, with learning rate
// alpha = 2^-ALPHA_SH:
//   background   : x fits and the components heavier than the closest one
//                  carry less than BG_T of the total weight together (the
//                  closest one is among the dominant components)
//   weights      : every component other than the target t keeps
//                  w - (w >> ALPHA_SH); t gets 1.0 minus their sum, so the
//                  weights stay normalised
//   fitted t     : mu += (x - mu) >>> ALPHA_SH,
//                  var += ((x - mu)^2 - var) >>> ALPHA_SH, sigma = sqrt(var)
//   new t        : mu = x, sigma = SIGMA_INIT
//   sigma is never below SIGMA_MIN after an update.
// Distances are compared by cross-multiplication, so no divider is needed.
//
// Interface: valid/ready input of a word_t (pixel + mixture), valid/ready
// output of a word_t (fg flag, fit flag, pixel, updated mixture). Timing: one word at a time. The result is
// offered 20 cycles after the input handshake when the pixel fits (one
// evaluate cycle, then the 16-step square root) and 2 cycles after it when a
// component is added; the next pixel is accepted the cycle after the result
// is taken.
module bsu
  import bsps_pkg::*;
#(
  parameter int          ALPHA_SH   = 7,        // alpha = 1/128
  parameter logic [7:0]  LAMBDA_Q4  = 8'd40,    // 2.5 in Q4.4
  parameter logic [15:0] BG_T       = 16'd29491, // 0.9 in Q1.15
  parameter logic [15:0] SIGMA_INIT = 16'h0800, // 8.0 in Q8.8
  parameter logic [15:0] SIGMA_MIN  = 16'h0080  // 0.5 in Q8.8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_word,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_word
);
  typedef enum logic [1:0] {S_IDLE, S_EVAL, S_SQRT, S_OUT} state_t;
  state_t state;

  pixel_t x;
  gmm_t   g;

  // ---------------- evaluation (combinational, S_EVAL) ----------------
  logic [15:0]        xq;
  logic signed [16:0] diff [K_MAX];
  logic [15:0]        d    [K_MAX];
  logic [K_MAX-1:0]   valid, fit;
  int unsigned        best, repl, tgt;
  logic               found, match, has_free, fg_c;
  gmm_t               gn;
  logic [16:0]        wsum, heavier;
  logic [31:0]        var_o, d2;
  logic signed [33:0] var_n;

  always_comb begin
    xq = {x, 8'b0};
    found = 1'b0; best = 0; has_free = 1'b0; repl = 0;
    for (int k = 0; k < K_MAX; k++) begin
      diff[k]  = $signed({1'b0, xq}) - $signed({1'b0, g[k].mu});
      d[k]     = diff[k][16] ? 16'(-diff[k]) : diff[k][15:0];
      valid[k] = (g[k].w != '0);
      fit[k]   = valid[k] && ((32'(d[k]) << 4) < 32'(LAMBDA_Q4) * 32'(g[k].sigma));
    end
    for (int k = 0; k < K_MAX; k++) begin
      if (valid[k]) begin
        if (!found || (32'(d[k]) * 32'(g[best].sigma) < 32'(d[best]) * 32'(g[k].sigma)))
          best = k;
        found = 1'b1;
      end
    end
    match = found && fit[best];
    heavier = '0;
    for (int k = 0; k < K_MAX; k++)
      if (g[k].w > g[best].w) heavier = heavier + 17'(g[k].w);
    fg_c  = !(match && (heavier < 17'(BG_T)));
    // slot for a new component: first free one, else the smallest weight
    for (int k = 0; k < K_MAX; k++) begin
      if (!valid[k] && !has_free) begin
        has_free = 1'b1;
        repl = k;
      end
    end
    if (!has_free)
      for (int k = 1; k < K_MAX; k++)
        if (g[k].w < g[repl].w) repl = k;
    tgt = match ? best : repl;

    gn = g;
    wsum = '0;
    for (int k = 0; k < K_MAX; k++) begin
      if (k != tgt) begin
        gn[k].w = g[k].w - (g[k].w >> ALPHA_SH);
        wsum    = wsum + 17'(gn[k].w);
      end
    end
    gn[tgt].w = (wsum >= 17'(W_ONE)) ? 16'd1 : 16'(17'(W_ONE) - wsum);

    var_o = 32'(g[tgt].sigma) * 32'(g[tgt].sigma);
    d2    = 32'(d[tgt]) * 32'(d[tgt]);
    var_n = $signed({2'b0, var_o}) + ($signed({2'b0, d2} - {2'b0, var_o}) >>> ALPHA_SH);
    if (match) begin
      gn[tgt].mu = 16'($signed({1'b0, g[tgt].mu}) + (diff[tgt] >>> ALPHA_SH));
    end else begin
      gn[tgt].mu    = xq;
      gn[tgt].sigma = SIGMA_INIT;
    end
  end

  // ---------------- square root of the new variance ----------------
  logic        sq_start, sq_busy, sq_done;
  logic [15:0] sq_root;
  logic [31:0] sq_in;
  isqrt #(.OUT_W(16)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(sq_in),
    .busy(sq_busy), .done(sq_done), .root(sq_root)
  );

  int unsigned tgt_q;
  logic fg_q, fit_q;
  gmm_t gq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; x <= '0; g <= '0; gq <= '0; fg_q <= 1'b0; fit_q <= 1'b0;
      tgt_q <= 0; sq_start <= 1'b0; sq_in <= '0;
    end else begin
      sq_start <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          x     <= in_word.pixel;
          g     <= in_word.gmm;
          state <= S_EVAL;
        end
        S_EVAL: begin
          gq    <= gn;
          fg_q  <= fg_c;
          fit_q <= match;
          tgt_q <= tgt;
          if (match) begin
            sq_in    <= var_n[31:0];
            sq_start <= 1'b1;
            state    <= S_SQRT;
          end else begin
            state <= S_OUT;
          end
        end
        S_SQRT: if (sq_done) begin
          gq[tgt_q].sigma <= (sq_root < SIGMA_MIN) ? SIGMA_MIN : sq_root;
          state <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);
  always_comb begin
    out_word       = '0;
    out_word.fg    = fg_q;
    out_word.fit   = fit_q;
    out_word.pixel = x;
    out_word.gmm   = gq;
  end

  // The result must stay stable while it waits for the consumer.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_word));
endmodule
