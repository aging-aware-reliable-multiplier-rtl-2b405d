// Word of Razor flip-flops.
//
// W one-bit Razor flip-flops share clk, clk_del, reset and enable; the OR of
// their error outputs is the stage's error (re-execute) signal. The bank
// also keeps two status flags for the word as a whole: a capture made on the
// last rising edge, and a repair from the shadow latches made on the last
// rising edge. `valid` says that q holds a correct result: after a capture
// with no error (known once clk_del has fallen) or after a repair.
//
// Interface: d, q are W bits; en is the stage enable. error and valid are
// to be sampled on the rising edge of clk. The caller must hold en low in a
// cycle in which error is high, so that the repair is not overwritten; an
// assertion checks this.
//
// The word of flip-flops and the OR of their errors follow the original architecture; the
// valid flag is this design's choice.
module razor_bank #(
  parameter int W = 38
) (
  input  logic         clk,
  input  logic         clk_del,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         error,
  output logic         valid
);

  logic [W-1:0] bit_err;
  logic         captured, repaired;

  for (genvar i = 0; i < W; i++) begin : g_bit
    razor_ff u_ff (
      .clk, .clk_del, .rst_n, .en, .d(d[i]), .q(q[i]), .error(bit_err[i])
    );
  end

  assign error = |bit_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      captured <= 1'b0;
      repaired <= 1'b0;
    end else begin
      captured <= en & ~error;
      repaired <= error;
    end
  end

  assign valid = (captured & ~error) | repaired;

  // a repair must not be overwritten: the stage is never enabled while a
  // bit is in error
  a_no_enable_on_error: assert property (
    @(posedge clk) disable iff (!rst_n) error |-> !en
  ) else $error("razor_bank: enabled while repairing");

endmodule
