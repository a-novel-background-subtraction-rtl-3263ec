// kmeans: k-means clustering of the pixel history (first stage of the MEU).
//
// Clusters the N_HIST samples of the history memory into at most K_MAX
// clusters and returns their centres, which seed the EM stage. Steps:
//   1. one pass finds the smallest and largest sample; the K_MAX centres
//      start evenly spread between them: c_k = min + (max-min)(2k+1)/(2K_MAX)
//   2. an assignment pass gives every sample to its nearest valid centre
//      (ties to the lower index) and accumulates per-cluster sums and counts
//   3. each centre becomes sum/count (Q8.8, sequential divider); a cluster
//      that received no sample is dropped (cvalid low), which is how fewer
//      than K_MAX components come out
//   4. steps 2-3 repeat until no centre moves or MAX_ITERS passes are done
//   5. neighbouring clusters whose samples leave a gap of at most MERGE_GAP
//      levels between them (largest sample of the lower cluster, smallest of
//      the upper one) are merged and their centre recomputed, so that one
//      broad mode is not returned as several pieces. In one dimension the
//      centres stay sorted, so neighbours are consecutive valid slots.
// k-means as the seeding stage and the maximum number of clusters as its
// input follow the system description; the initialisation, stopping rule,
// merging rule and arithmetic are this design's choice.
// Interface: pulse start; the block reads the history through rd_addr /
// rd_data (one cycle read latency) and pulses done with centres (Q8.8),
// cvalid, the final cluster counts and the number of passes run (the merge
// step is not counted). A pass takes N_HIST+2 cycles, an update about 35
// cycles per valid cluster.
module kmeans
  import bsps_pkg::*;
#(
  parameter int N_HIST    = 100,
  parameter int MAX_ITERS = 10,
  parameter int MERGE_GAP = 2,
  localparam int AW       = $clog2(N_HIST)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [AW-1:0]     rd_addr,
  input  pixel_t            rd_data,
  output logic [15:0]       centers [K_MAX],
  output logic [K_MAX-1:0]  cvalid,
  output logic [AW:0]       counts  [K_MAX],
  output logic [7:0]        iters
);
  typedef enum logic [2:0] {S_IDLE, S_MINMAX, S_ASSIGN, S_UPD, S_DIVW, S_MERGE, S_DONE} state_t;
  state_t state;

  logic [AW:0]  ri, seen;      // next address to issue, samples consumed
  logic         issuing, dv;
  pixel_t       vmin, vmax;
  logic [PIX_W+AW:0] sums [K_MAX];
  int unsigned  uk;
  logic         changed;
  pixel_t       cmin [K_MAX], cmax [K_MAX];   // sample range of each cluster
  logic         merged;                       // merge step done, final update
  int unsigned  anc;                          // lower neighbour in the merge scan

  // nearest valid centre of the sample on rd_data
  int unsigned  near;
  logic [15:0]  dn, dk, xq;
  always_comb begin
    xq = {rd_data, 8'b0};
    near = 0; dn = '1;
    for (int k = 0; k < K_MAX; k++) begin
      dk = (xq >= centers[k]) ? xq - centers[k] : centers[k] - xq;
      if (cvalid[k] && (dk < dn)) begin
        dn = dk;
        near = k;
      end
    end
  end

  logic        dv_start, dv_busy, dv_done;
  logic [31:0] dv_q, dv_r;
  seq_div #(.W(32)) u_div (
    .clk, .rst_n, .start(dv_start),
    .dividend(32'(sums[uk]) << 8), .divisor(32'(counts[uk])),
    .busy(dv_busy), .done(dv_done), .quotient(dv_q), .remainder(dv_r)
  );

  assign rd_addr = ri[AW-1:0];
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ri <= '0; seen <= '0; issuing <= 1'b0; dv <= 1'b0;
      vmin <= '0; vmax <= '0; uk <= 0; changed <= 1'b0; iters <= '0;
      cvalid <= '0; done <= 1'b0; dv_start <= 1'b0; merged <= 1'b0; anc <= 0;
      for (int k = 0; k < K_MAX; k++) begin
        centers[k] <= '0; counts[k] <= '0; sums[k] <= '0; cmin[k] <= '0; cmax[k] <= '0;
      end
    end else begin
      done     <= 1'b0;
      dv_start <= 1'b0;
      // address stream shared by both kinds of pass
      dv <= issuing;
      if (issuing) begin
        if (ri == (AW+1)'(N_HIST - 1)) issuing <= 1'b0;
        else ri <= ri + 1'b1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          ri <= '0; seen <= '0; issuing <= 1'b1; iters <= '0;
          vmin <= '1; vmax <= '0; merged <= 1'b0;
          state <= S_MINMAX;
        end
        S_MINMAX: begin
          if (dv) begin
            if (rd_data < vmin) vmin <= rd_data;
            if (rd_data > vmax) vmax <= rd_data;
            seen <= seen + 1'b1;
          end
          if (seen == (AW+1)'(N_HIST)) begin
            for (int k = 0; k < K_MAX; k++)
              centers[k] <= 16'({vmin, 8'b0} +
                            ((32'(vmax - vmin) << 8) * 32'(2 * k + 1)) / 32'(2 * K_MAX));
            cvalid <= '1;
            for (int k = 0; k < K_MAX; k++) begin
              sums[k] <= '0; counts[k] <= '0; cmin[k] <= '1; cmax[k] <= '0;
            end
            ri <= '0; seen <= '0; issuing <= 1'b1;
            state <= S_ASSIGN;
          end
        end
        S_ASSIGN: begin
          if (dv) begin
            sums[near]   <= sums[near] + (PIX_W+AW+1)'(rd_data);
            counts[near] <= counts[near] + 1'b1;
            if (rd_data < cmin[near]) cmin[near] <= rd_data;
            if (rd_data > cmax[near]) cmax[near] <= rd_data;
            seen <= seen + 1'b1;
          end
          if (seen == (AW+1)'(N_HIST)) begin
            uk <= 0; changed <= 1'b0;
            state <= S_UPD;
          end
        end
        S_UPD: begin
          if (uk == K_MAX) begin
            if (merged) begin
              done  <= 1'b1;
              state <= S_DONE;
            end else if (!changed || (int'(iters) + 1 >= MAX_ITERS)) begin
              iters <= iters + 1'b1;
              uk    <= 0;
              anc   <= K_MAX;
              state <= S_MERGE;
            end else begin
              iters <= iters + 1'b1;
              for (int k = 0; k < K_MAX; k++) begin
                sums[k] <= '0; counts[k] <= '0; cmin[k] <= '1; cmax[k] <= '0;
              end
              ri <= '0; seen <= '0; issuing <= 1'b1;
              state <= S_ASSIGN;
            end
          end else if (counts[uk] == '0) begin
            if (cvalid[uk]) changed <= 1'b1;
            cvalid[uk] <= 1'b0;
            uk <= uk + 1;
          end else begin
            dv_start <= 1'b1;
            state <= S_DIVW;
          end
        end
        S_DIVW: if (dv_done) begin
          if (dv_q[15:0] != centers[uk]) changed <= 1'b1;
          centers[uk] <= dv_q[15:0];
          uk <= uk + 1;
          state <= S_UPD;
        end
        // one scan over the slots, uk walking upwards, anc = last kept slot;
        // the final update then recomputes the centres from the merged sums
        S_MERGE: begin
          if (uk == K_MAX) begin
            merged <= 1'b1;
            uk     <= 0;
            state  <= S_UPD;
          end else begin
            if (cvalid[uk]) begin
              if (anc != K_MAX &&
                  int'(cmin[uk]) - int'(cmax[anc]) <= MERGE_GAP) begin
                sums[anc]   <= sums[anc] + sums[uk];
                counts[anc] <= counts[anc] + counts[uk];
                cmax[anc]   <= cmax[uk];
                cvalid[uk]  <= 1'b0;
              end else begin
                anc <= uk;
              end
            end
            uk <= uk + 1;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
