// Zero-count judging block of the adaptive hold logic.
//
// Counts the zero bits of the operand that controls bypassing and reports
// whether that count is larger than THRESH. A large number of zeros means
// many adder stages of the bypassing multiplier are skipped, so the
// operation is short enough to finish in one clock cycle. The AHL holds two
// of these blocks, one with threshold n and one with threshold n+1.
//
// Interface: x (W bits) in; zeros (number of zero bits) and more_zeros
// (zeros > THRESH) out. Purely combinational.
//
// The original architecture gives the block's function (#0s > n); the population count
// written as a loop of additions is this design's choice.
module zero_judge #(
  parameter int W      = 16,
  parameter int THRESH = 7
) (
  input  logic [W-1:0]         x,
  output logic [$clog2(W+1)-1:0] zeros,
  output logic                 more_zeros
);

  always_comb begin
    zeros = '0;
    for (int i = 0; i < W; i++) begin
      zeros += {{($clog2(W+1)-1){1'b0}}, ~x[i]};
    end
  end

  assign more_zeros = (int'(zeros) > THRESH);

endmodule
