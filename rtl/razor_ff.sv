// One-bit Razor flip-flop.
//
// A main flip-flop samples d on the rising edge of clk. A shadow latch,
// transparent while the delayed clock clk_del is high, samples the same d a
// little later. If the combinational path that drives d was too slow, the
// main flip-flop holds a stale value while the shadow latch holds the correct
// one; the XOR comparator then raises `error`. On the next rising edge the
// mux in front of the main flip-flop loads the shadow value instead of d,
// which repairs the stored bit one cycle late.
//
// en is the clock enable of the stage: the main flip-flop only takes d when
// en is 1. The shadow latch only opens, and the comparison is only made, in
// the cycle right after such a capture (`captured`), so a held or repaired
// value is never compared with data of the next operation.
//
// Timing: error is valid once clk_del has fallen, and must be sampled on the
// next rising edge of clk. clk_del must rise after clk and fall before the
// next rising edge of clk; the path driving d must not change d before
// clk_del falls (Razor's short-path constraint).
//
// The shadow element is a level-sensitive latch on purpose: the original
// architecture specifies a shadow latch, and the latch a synthesis tool
// reports here is that latch. Main flip-flop, shadow latch, XOR and mux
// follow the original architecture; the enable and the `captured`
// qualifier are this design's choices.
module razor_ff (
  input  logic clk,
  input  logic clk_del,
  input  logic rst_n,
  input  logic en,
  input  logic d,
  output logic q,
  output logic error
);

  logic shadow;
  logic captured;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= 1'b0;
      captured <= 1'b0;
    end else if (error) begin
      q        <= shadow;
      captured <= 1'b0;
    end else begin
      if (en) q <= d;
      captured <= en;
    end
  end

  always_latch begin
    if (!rst_n)                    shadow = 1'b0;
    else if (clk_del && captured)  shadow = d;
  end

  assign error = captured & (q ^ shadow);

endmodule
