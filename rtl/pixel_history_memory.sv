// pixel_history_memory: storage for the history of one pixel location.
//
// Holds DEPTH samples (about 100 in the system description) of PIX_W bits
// that the model estimation unit clusters and fits. One write port and one
// read port; the read is registered (data appears the cycle after the
// address), so the array maps onto a block RAM. Port shape and read latency
// are this design's choice.
module pixel_history_memory #(
  parameter int DEPTH = 100,
  parameter int PIX_W = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [PIX_W-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [PIX_W-1:0] rdata
);
  logic [PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
