// seq_div: sequential unsigned divider, quotient = dividend / divisor.
//
// Restoring division, one quotient bit per clock: a pulse on start loads the
// operands, busy stays high for W cycles and done pulses for one cycle with
// quotient and remainder valid (they hold until the next start). Division by
// zero returns an all-ones quotient. Helper of this design, shared by the
// k-means and EM stages of the model estimation unit.
module seq_div #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  logic [W-1:0] d;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0] rem_sh;

  always_comb rem_sh = {remainder, quotient[W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
      quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        quotient  <= dividend;   // shifted out MSB first, replaced by result bits
        remainder <= '0;
        d         <= divisor;
        cnt       <= W[$clog2(W+1)-1:0];
        busy      <= 1'b1;
      end else if (busy) begin
        if (rem_sh >= {1'b0, d}) begin
          remainder <= W'(rem_sh - {1'b0, d});
          quotient  <= {quotient[W-2:0], 1'b1};
        end else begin
          remainder <= rem_sh[W-1:0];
          quotient  <= {quotient[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
