// meu: Model Estimation Unit. Builds the initial Gaussian mixture of one
// pixel location from a short history of its values.
//
// Runs once per pixel location at system initialisation:
//   LOAD   : accepts N_HIST history samples (valid/ready) into the
//            pixel history memory
//   KMEANS : clusters them into at most K_MAX centres (kmeans)
//   EM     : refines weights, means and standard deviations by
//            Expectation-Maximization seeded with those centres (em_estimator)
//   OUT    : offers the mixture on model_valid/model_ready, then returns to
//            LOAD for the next pixel location.
// The number of components is settled automatically: empty k-means clusters
// are dropped, neighbouring clusters with no gap between their samples are
// merged, and EM components whose weight falls below W_MIN are dropped. The
// organisation (history memory -> k-means -> iterated E/M steps -> weight,
// mean, sigma) follows the system description; the sizes other than the
// ~100-sample history and all arithmetic are this design's choice. The
// history memory's read port is owned by k-means, then by EM.
module meu
  import bsps_pkg::*;
#(
  parameter int          N_HIST    = 100,
  parameter int          KM_ITERS  = 10,
  parameter int          EM_ITERS  = 5,
  parameter logic [15:0] W_MIN     = 16'd1638,   // 0.05 in Q1.15
  parameter logic [15:0] SIGMA_MIN = 16'h0080,   // 0.5 in Q8.8
  localparam int         AW        = $clog2(N_HIST)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   hist_valid,
  output logic   hist_ready,
  input  pixel_t hist_pixel,
  output logic   model_valid,
  input  logic   model_ready,
  output gmm_t   model_gmm,
  output logic   busy
);
  typedef enum logic [2:0] {S_LOAD, S_KM, S_KMW, S_EMW, S_OUT} state_t;
  state_t state;

  logic [AW:0]   wcnt;
  logic          we;
  logic [AW-1:0] raddr, km_addr, em_addr;
  pixel_t        rdata;

  pixel_history_memory #(.DEPTH(N_HIST), .PIX_W(PIX_W)) u_hist (
    .clk, .we, .waddr(wcnt[AW-1:0]), .wdata(hist_pixel), .raddr, .rdata
  );

  logic              km_start, km_busy, km_done;
  logic [15:0]       centers [K_MAX];
  logic [K_MAX-1:0]  cvalid;
  logic [AW:0]       counts [K_MAX];
  logic [7:0]        km_iters;
  kmeans #(.N_HIST(N_HIST), .MAX_ITERS(KM_ITERS)) u_km (
    .clk, .rst_n, .start(km_start), .busy(km_busy), .done(km_done),
    .rd_addr(km_addr), .rd_data(rdata), .centers, .cvalid, .counts, .iters(km_iters)
  );

  logic em_start, em_busy, em_done;
  em_estimator #(.N_HIST(N_HIST), .EM_ITERS(EM_ITERS), .W_MIN(W_MIN),
                 .SIGMA_MIN(SIGMA_MIN)) u_em (
    .clk, .rst_n, .start(em_start), .centers, .cvalid, .busy(em_busy),
    .done(em_done), .rd_addr(em_addr), .rd_data(rdata), .gmm(model_gmm)
  );

  assign raddr       = (state == S_EMW) ? em_addr : km_addr;
  assign hist_ready  = (state == S_LOAD);
  assign we          = hist_valid && hist_ready;
  assign model_valid = (state == S_OUT);
  assign busy        = (state != S_LOAD) || km_busy || em_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD; wcnt <= '0; km_start <= 1'b0; em_start <= 1'b0;
    end else begin
      km_start <= 1'b0;
      em_start <= 1'b0;
      unique case (state)
        S_LOAD: if (we) begin
          if (wcnt == (AW+1)'(N_HIST - 1)) begin
            wcnt  <= '0;
            state <= S_KM;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        S_KM: begin
          km_start <= 1'b1;
          state <= S_KMW;
        end
        S_KMW: if (km_done) begin
          em_start <= 1'b1;
          state <= S_EMW;
        end
        S_EMW: if (em_done) state <= S_OUT;
        S_OUT: if (model_ready) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
