// Judging block of the adaptive hold logic: counts the zero bits of an M-bit
// operand and reports whether there are more than THRESH of them.
//
// An operand with many zero bits bypasses many adder columns of the
// multiplier, so its product settles fast; more_zeros = 1 therefore predicts
// a one-cycle operation. The comparison "number of zeros > threshold" is the
// described function; the adder-tree count is this implementation's choice.
// Combinational, no clock.
module zero_judge #(
  parameter int unsigned M      = 16,
  parameter int unsigned THRESH = M / 2 - 1
) (
  input  logic [M-1:0] x,
  output logic         more_zeros
);
  localparam int unsigned CW = $clog2(M + 1);

  logic [CW-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int unsigned i = 0; i < M; i++) if (!x[i]) zeros += 1'b1;
  end

  assign more_zeros = (32'(zeros) > THRESH);
endmodule
