// bsps_top: Background Subtraction Parallel System.
//
// Segments a thermal video stream into background and foreground pixels,
// keeping a Gaussian mixture model per pixel location in external memory.
// Two parts:
//   * the streaming part: N_CORES background subtraction cores (bsu), each
//     behind its own FIFO. A shared load bus (load_dispatch) deals the words
//     read from memory (pixel + its current mixture, 256 bits) round-robin
//     to the cores, a batch of N_CORES pixels at a time; writeback_collect
//     returns each core's result (fg/fit flags, pixel, updated mixture) to
//     memory in the same order, so results leave in input order.
//   * N_MEU model estimation units (meu, default one), used at
//     initialisation: from a history of N_HIST values of a pixel location
//     each builds that location's first mixture (k-means, then EM) and
//     offers it for storage. More than one MEU, each with its own streams,
//     shortens initialisation when the system is re-initialised often.
// External memory and the camera are outside this design: their side is the
// three valid/ready streams below. Word format: bsps_pkg::word_t.
//
// Parallel cores fed through FIFOs from a shared bus, batches of up to 16,
// one MEU next to the cores by default with the ratio of cores to MEUs
// adjustable, the 256-bit word and the default of 4 cores
// (the low-cost configuration; 16 is the large one) follow the system
// description. The dealing order, the FIFO depth and the handshakes are this
// design's choice. A pixel that fits its model occupies a core for 21
// cycles, one that adds a component for 3, plus one cycle to hand over.
module bsps_top
  import bsps_pkg::*;
#(
  parameter int N_CORES    = 4,
  parameter int FIFO_DEPTH = 4,
  parameter int N_HIST     = 100,
  parameter int N_MEU      = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  // load bus: pixel words with their current mixtures, from memory
  input  logic   ld_valid,
  output logic   ld_ready,
  input  word_t  ld_word,
  output logic   ld_batch_done,
  // write-back bus: segmentation and updated mixtures, to memory
  output logic   wb_valid,
  input  logic   wb_ready,
  output word_t  wb_word,
  // model estimation, one stream pair per MEU: pixel history in, initial
  // mixture out
  input  logic   [N_MEU-1:0] hist_valid,
  output logic   [N_MEU-1:0] hist_ready,
  input  pixel_t [N_MEU-1:0] hist_pixel,
  output logic   [N_MEU-1:0] model_valid,
  input  logic   [N_MEU-1:0] model_ready,
  output gmm_t   [N_MEU-1:0] model_gmm,
  output logic   [N_MEU-1:0] meu_busy
);
  logic [N_CORES-1:0] d_valid, d_ready, f_valid, f_ready, c_valid, c_ready;
  logic [WORD_W-1:0]  d_data;
  logic [WORD_W-1:0]  f_data [N_CORES];
  logic [WORD_W-1:0]  c_data [N_CORES];
  logic [WORD_W-1:0]  wb_bits;

  load_dispatch #(.N_CORES(N_CORES), .WIDTH(WORD_W)) u_load (
    .clk, .rst_n, .in_valid(ld_valid), .in_ready(ld_ready), .in_data(ld_word),
    .out_valid(d_valid), .out_ready(d_ready), .out_data(d_data),
    .batch_done(ld_batch_done)
  );

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    word_t core_in, core_out;
    logic [$clog2(FIFO_DEPTH+1)-1:0] level;
    sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .in_valid(d_valid[c]), .in_ready(d_ready[c]), .in_data(d_data),
      .out_valid(f_valid[c]), .out_ready(f_ready[c]), .out_data(f_data[c]),
      .count(level)
    );
    assign core_in = word_t'(f_data[c]);
    bsu u_bsu (
      .clk, .rst_n, .in_valid(f_valid[c]), .in_ready(f_ready[c]), .in_word(core_in),
      .out_valid(c_valid[c]), .out_ready(c_ready[c]), .out_word(core_out)
    );
    assign c_data[c] = core_out;
  end

  writeback_collect #(.N_CORES(N_CORES), .WIDTH(WORD_W)) u_wb (
    .clk, .rst_n, .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(wb_valid), .out_ready(wb_ready), .out_data(wb_bits)
  );
  assign wb_word = word_t'(wb_bits);

  for (genvar m = 0; m < N_MEU; m++) begin : g_meu
    meu #(.N_HIST(N_HIST)) u_meu (
      .clk, .rst_n, .hist_valid(hist_valid[m]), .hist_ready(hist_ready[m]),
      .hist_pixel(hist_pixel[m]), .model_valid(model_valid[m]),
      .model_ready(model_ready[m]), .model_gmm(model_gmm[m]), .busy(meu_busy[m])
    );
  end
endmodule
