// Column-bypassing array multiplier, m x m bits unsigned.
//
// The array holds one carry-save adder stage per multiplicand bit md[i];
// stage i adds the partial product md[i] * mr, shifted i places, to the
// running (sum, carry) pair. With the partial products laid out in the usual
// array, stage i is the column of cells driven by md[i]. When md[i] is 0 the
// whole column is bypassed, so a multiplicand with many zero bits activates
// few adder cells and has a short critical path. A carry-propagate adder
// adds the final sum and carry words into the 2m-bit product.
//
// Interface: md (multiplicand) and mr (multiplicator), W bits each; product,
// 2W bits. Combinational; the surrounding logic decides from the number of
// zeros in md whether it is given one or two clock cycles.
//
// The original architecture names the column-bypassing multiplier and states that its
// bypassing is steered by the multiplicand. The carry-save organisation,
// which needs no correction logic, is this design's choice.
module column_bypass_multiplier #(
  parameter int W = 16
) (
  input  logic [W-1:0]   md,
  input  logic [W-1:0]   mr,
  output logic [2*W-1:0] product
);

  logic [2*W-1:0] s [W+1];
  logic [2*W-1:0] c [W+1];

  assign s[0] = '0;
  assign c[0] = '0;

  for (genvar i = 0; i < W; i++) begin : g_col
    bypass_csa_row #(.W2(2*W)) u_stage (
      .s_in  (s[i]),
      .c_in  (c[i]),
      .pp    ((2*W)'(mr) << i),
      .bypass(~md[i]),
      .s_out (s[i+1]),
      .c_out (c[i+1])
    );
  end

  assign product = s[W] + c[W];

endmodule
