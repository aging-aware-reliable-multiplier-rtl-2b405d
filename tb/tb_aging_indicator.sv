// Self-checking test of aging_indicator with a short window (8 operations,
// threshold 2 errors). Phase 1 keeps the error count of every window at the
// threshold, so `aged` must stay 0 and the window restart must be exercised;
// phase 2 exceeds the threshold, after which `aged` must rise on the edge
// that counts the third error and stay 1. A cycle-level model checks every
// cycle.
module tb_aging_indicator;
  localparam int WINDOW = 8;
  localparam int THR    = 2;
  logic clk = 0, rst_n = 0, op_done = 0, error = 0, aged;
  int checks = 0, failures = 0;
  int m_ops = 0, m_errs = 0;
  bit m_aged = 0;

  aging_indicator #(.WINDOW(WINDOW), .THRESHOLD(THR)) dut (.clk, .rst_n, .op_done, .error, .aged);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated on the same edges as the block
  always @(posedge clk) if (rst_n) begin
    if (m_errs + int'(error) > THR) m_aged = 1;
    if (op_done && m_ops == WINDOW - 1) begin
      m_ops = 0; m_errs = 0;
    end else begin
      m_ops += int'(op_done);
      m_errs += int'(error);
    end
  end

  task automatic step(input bit od, input bit er);
    op_done = od; error = er;
    @(posedge clk); #1;
    checks++;
    if (aged !== m_aged) begin
      failures++;
      $display("FAIL at %0t aged=%0b expected %0b", $time, aged, m_aged);
    end
  endtask

  int windows_clean = 0;
  initial begin
    #12 rst_n = 1;
    // phase 1: exactly THR errors in every window, never aged
    for (int w = 0; w < 6; w++) begin
      for (int i = 0; i < WINDOW; i++) begin
        step(1'b1, i < THR);
        step(1'b0, 1'b0);
      end
      windows_clean++;
    end
    checks++;
    if (aged !== 1'b0) begin failures++; $display("FAIL aged without exceeding the threshold"); end
    // phase 2: one more error than the threshold in a window
    for (int i = 0; i < THR + 1; i++) step(1'b1, 1'b1);
    checks++;
    if (aged !== 1'b1) begin failures++; $display("FAIL not aged after %0d errors", THR + 1); end
    // random traffic: stays aged
    for (int i = 0; i < 200; i++) step(1'($urandom), 1'($urandom_range(0, 3) == 0));
    checks++;
    if (aged !== 1'b1) begin failures++; $display("FAIL aged did not stay set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
