// Row-bypassing array multiplier, m x m bits unsigned.
//
// The array holds one row of carry-save adders per multiplicator bit mr[j];
// row j adds the partial product md * mr[j], shifted j places, to the
// running (sum, carry) pair. When mr[j] is 0 the addition of row j is
// disabled and its inputs are passed on unchanged, so a multiplicator with
// many zero bits activates few rows and has a short critical path. A
// carry-propagate adder adds the final sum and carry words into the 2m-bit
// product.
//
// Interface: md (multiplicand) and mr (multiplicator), W bits each; product,
// 2W bits. Combinational; the surrounding logic decides from the number of
// zeros in mr whether it is given one or two clock cycles.
//
// From the original architecture: rows disabled on a zero multiplicator bit, with muxes
// passing the row's inputs on. Its rows are narrower and need extra
// correcting circuits for the rightmost bypassed adders; this design keeps
// full-width rows instead, which makes the pass-through exact and needs no
// correction.
module row_bypass_multiplier #(
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

  for (genvar j = 0; j < W; j++) begin : g_row
    bypass_csa_row #(.W2(2*W)) u_row (
      .s_in  (s[j]),
      .c_in  (c[j]),
      .pp    ((2*W)'(md) << j),
      .bypass(~mr[j]),
      .s_out (s[j+1]),
      .c_out (c[j+1])
    );
  end

  assign product = s[W] + c[W];

endmodule
