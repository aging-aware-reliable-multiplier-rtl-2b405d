// Adaptive hold logic (AHL).
//
// Decides, for the operation now held in the operand registers, whether the
// bypassing multiplier needs one clock cycle or two, and produces the
// `gating` signal that enables the operand registers and the result stage.
// Two judging blocks test the bypass-selecting operand for more than n and
// more than n+1 zero bits. While the aging indicator reports no significant
// aging the n judge is used; once it reports aging the stricter n+1 judge is
// used, so fewer patterns are treated as one-cycle patterns.
//
// The selected judgement is ORed with the inverted state of a flip-flop
// clocked on the falling clock edge, whose output is `gating`. A one-cycle
// pattern keeps gating at 1. A two-cycle pattern drives gating to 0 for one
// clock cycle (the OR with the inverted output forces it back to 1 on the
// following falling edge), which holds the operands and the result stage for
// one extra cycle. Changing on the falling edge keeps gating stable around
// every rising edge.
//
// Interface: operand (W bits) is the multiplicand for column bypassing or the
// multiplicator for row bypassing. error and op_done feed the aging
// indicator. gating = 1 means the current operation completes at the next
// rising edge. Reset (asynchronous, active low) sets gating to 1.
//
// From the original architecture: the two judges, the mux steered by the aging indicator,
// the OR gate and the falling-edge flip-flop. The value of n and the
// indicator's window and threshold are this design's choices.
module ahl #(
  parameter int W               = 16,
  parameter int JUDGE_N         = 7,
  parameter int AGING_WINDOW    = 128,
  parameter int AGING_THRESHOLD = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] operand,
  input  logic         op_done,
  input  logic         error,
  output logic         gating,
  output logic         aged,
  output logic [$clog2(W+1)-1:0] zeros
);

  logic judge_n, judge_n1, one_cycle;

  zero_judge #(.W(W), .THRESH(JUDGE_N)) u_judge_n (
    .x(operand), .zeros(zeros), .more_zeros(judge_n)
  );

  zero_judge #(.W(W), .THRESH(JUDGE_N + 1)) u_judge_n1 (
    .x(operand), .zeros(), .more_zeros(judge_n1)
  );

  aging_indicator #(.WINDOW(AGING_WINDOW), .THRESHOLD(AGING_THRESHOLD)) u_aging (
    .clk, .rst_n, .op_done, .error, .aged
  );

  assign one_cycle = aged ? judge_n1 : judge_n;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) gating <= 1'b1;
    else        gating <= one_cycle | ~gating;
  end

  // an operation is held for at most one extra cycle
  a_hold_one_cycle: assert property (
    @(negedge clk) disable iff (!rst_n) !gating |=> gating
  ) else $error("ahl: gating low for two cycles");

endmodule
