// Aging indicator of the adaptive hold logic.
//
// Counts the timing errors reported by the Razor flip-flops over a window of
// WINDOW completed operations. Both counters restart at the end of each
// window. When the error count of a window exceeds THRESHOLD the circuit is
// taken to have aged significantly and `aged` goes to 1. It then stays at 1
// until reset, because transistor aging does not reverse; this stickiness,
// the window length and the threshold are this design's choices (the
// original architecture names the counter, the window, the threshold and
// the output but gives no numbers).
//
// Interface: op_done pulses once per completed operation, error once per
// detected timing error (both sampled on the rising clock edge). aged is
// registered. Reset is asynchronous, active low.
module aging_indicator #(
  parameter int WINDOW    = 128,
  parameter int THRESHOLD = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,
  input  logic error,
  output logic aged
);

  localparam int OPW  = $clog2(WINDOW + 1);
  localparam int ERRW = $clog2(WINDOW + 2);

  logic [OPW-1:0]  op_cnt;
  logic [ERRW-1:0] err_cnt;
  logic [ERRW-1:0] err_next;
  logic            window_end;

  assign err_next   = err_cnt + ERRW'(error);
  assign window_end = op_done && (int'(op_cnt) == WINDOW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_cnt  <= '0;
      err_cnt <= '0;
      aged    <= 1'b0;
    end else begin
      if (int'(err_next) > THRESHOLD) aged <= 1'b1;
      if (window_end) begin
        op_cnt  <= '0;
        err_cnt <= '0;
      end else begin
        if (op_done) op_cnt <= op_cnt + 1'b1;
        err_cnt <= err_next;
      end
    end
  end

endmodule
