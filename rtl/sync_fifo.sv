// sync_fifo: single-clock FIFO with valid/ready handshakes on both sides.
//
// One sits in front of every background subtraction core. It buffers words
// of WIDTH bits (default 256: one pixel together with its mixture model) so
// that the latency of the external memory is hidden behind the processing.
// A word is written when in_valid && in_ready and read when out_valid &&
// out_ready; a word written into an empty FIFO is visible at the output on
// the next cycle. Storage is a register array addressed by read and write
// pointers with an occupancy counter. The 256-bit width follows the system
// description; the depth is this design's choice.
module sync_fifo #(
  parameter int WIDTH = 256,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != 0);
  assign out_data  = mem[rptr];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  // A word may not be taken from an empty FIFO nor pushed into a full one.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != 0);
  assert property (@(posedge clk) disable iff (!rst_n) push |-> count != DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
