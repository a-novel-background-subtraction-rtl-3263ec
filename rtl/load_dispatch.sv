// load_dispatch: shared-bus loader that hands pixel words to the cores.
//
// Words arriving from external memory (pixel plus its mixture model) are
// dealt out round-robin, one per core, so that a batch of N_CORES
// consecutive pixels (up to 16) is processed in parallel. The word is
// broadcast on out_data and only the addressed core sees out_valid; the
// pointer advances on each handshake, so a core whose FIFO is full stalls
// the bus (in_ready low) until it drains. Dealing in fixed order keeps the
// pixel order recoverable by writeback_collect. Batches of up to 16 pixels on
// a shared bus follow the system description; the round-robin order and the
// handshake are this design's choice.
module load_dispatch #(
  parameter int N_CORES = 4,
  parameter int WIDTH   = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [WIDTH-1:0]   in_data,
  output logic [N_CORES-1:0] out_valid,
  input  logic [N_CORES-1:0] out_ready,
  output logic [WIDTH-1:0]   out_data,
  output logic               batch_done    // pulses when the last core of a batch is loaded
);
  localparam int PW = (N_CORES > 1) ? $clog2(N_CORES) : 1;
  logic [PW-1:0] ptr;

  assign out_data = in_data;
  assign in_ready = out_ready[ptr];
  always_comb begin
    out_valid = '0;
    out_valid[ptr] = in_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      batch_done <= 1'b0;
    end else begin
      batch_done <= 1'b0;
      if (in_valid && in_ready) begin
        if (ptr == PW'(N_CORES - 1)) begin
          ptr <= '0;
          batch_done <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

  initial assert (N_CORES >= 1 && N_CORES <= 16) else $error("batches hold 1 to 16 pixels");
endmodule
