// isqrt: sequential integer square root, floor(sqrt(radicand)).
//
// Digit-by-digit (restoring) method, one result bit per clock: a pulse on
// start loads the radicand, busy stays high for OUT_W cycles and done pulses
// for one cycle with root valid (root holds until the next start). Used to
// turn a variance (Q16.16) into a standard deviation (Q8.8). Helper of this
// design; the system description does not say how the square root is taken.
module isqrt #(
  parameter int OUT_W = 16                 // root width; radicand is 2*OUT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [2*OUT_W-1:0] radicand,
  output logic               busy,
  output logic               done,
  output logic [OUT_W-1:0]   root
);
  logic [2*OUT_W-1:0] op;
  logic [OUT_W+1:0]   rem;
  logic [$clog2(OUT_W+1)-1:0] cnt;

  logic [OUT_W+1:0] rem_sh, trial;
  always_comb begin
    rem_sh = {rem[OUT_W-1:0], op[2*OUT_W-1 -: 2]};
    trial  = {root, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= '0; rem <= '0; root <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        op   <= radicand;
        rem  <= '0;
        root <= '0;
        cnt  <= OUT_W[$clog2(OUT_W+1)-1:0];
        busy <= 1'b1;
      end else if (busy) begin
        if (rem_sh >= trial) begin
          rem  <= rem_sh - trial;
          root <= {root[OUT_W-2:0], 1'b1};
        end else begin
          rem  <= rem_sh;
          root <= {root[OUT_W-2:0], 1'b0};
        end
        op  <= op << 2;
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
