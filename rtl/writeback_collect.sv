// writeback_collect: write-back path from the cores to external memory.
//
// Takes the result words (segmentation flag, pixel, updated mixture) from the
// cores in the same round-robin order in which load_dispatch dealt the
// pixels, so results leave in input order. Only the core at the pointer is
// offered to the bus; the pointer advances on each output handshake. Output
// back-pressure (out_ready low) holds every core's result in place. The
// round-robin order and handshake are this design's choice.
module writeback_collect #(
  parameter int N_CORES = 4,
  parameter int WIDTH   = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_CORES-1:0] in_valid,
  output logic [N_CORES-1:0] in_ready,
  input  logic [WIDTH-1:0]   in_data [N_CORES],
  output logic               out_valid,
  input  logic               out_ready,
  output logic [WIDTH-1:0]   out_data
);
  localparam int PW = (N_CORES > 1) ? $clog2(N_CORES) : 1;
  logic [PW-1:0] ptr;

  assign out_valid = in_valid[ptr];
  assign out_data  = in_data[ptr];
  always_comb begin
    in_ready = '0;
    in_ready[ptr] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (out_valid && out_ready)
      ptr <= (ptr == PW'(N_CORES - 1)) ? '0 : ptr + 1'b1;
  end
endmodule
