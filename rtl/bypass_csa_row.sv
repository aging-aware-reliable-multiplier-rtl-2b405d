// One bypassable carry-save adder stage of a bypassing array multiplier.
//
// Adds a shifted partial product pp to the redundant (sum, carry) pair that
// arrives from the previous stage: a row of full adders produces the new sum
// bits and the new carry bits, the carries moved one place left. When the
// bit of the controlling operand is 0 the partial product is all zeros and
// the stage is bypassed: a mux passes the incoming sum and carry straight
// through, so the full adders of the stage need not switch.
//
// Interface: s_in, c_in, pp, s_out, c_out are W2 bits wide (2m for an m-bit
// multiplier); bypass = 1 skips the stage. Combinational. Carries out of the
// top bit are dropped, which is exact because the final product fits in W2
// bits.
module bypass_csa_row #(
  parameter int W2 = 32
) (
  input  logic [W2-1:0] s_in,
  input  logic [W2-1:0] c_in,
  input  logic [W2-1:0] pp,
  input  logic          bypass,
  output logic [W2-1:0] s_out,
  output logic [W2-1:0] c_out
);

  logic [W2-1:0] fa_sum;
  logic [W2-2:0] fa_carry;

  always_comb begin
    for (int i = 0; i < W2; i++) fa_sum[i] = s_in[i] ^ c_in[i] ^ pp[i];
    for (int i = 0; i < W2 - 1; i++) begin
      fa_carry[i] = (s_in[i] & c_in[i]) | (s_in[i] & pp[i]) | (c_in[i] & pp[i]);
    end
  end

  assign s_out = bypass ? s_in : fa_sum;
  assign c_out = bypass ? c_in : {fa_carry, 1'b0};

endmodule
