// Self-checking test of the adaptive hold logic (16-bit operand, n = 7,
// aging window 8 operations, threshold 2 errors). A reference model of the
// falling-edge flip-flop, the two judges and the aging indicator predicts
// `gating` every cycle. Checked: a one-cycle pattern keeps gating at 1, a
// two-cycle pattern drops it for exactly one cycle, and after the aging
// indicator trips a pattern with n+1 zeros turns from one-cycle into
// two-cycle.
module tb_ahl;
  localparam int W = 16, N = 7, WIN = 8, THR = 2;
  logic clk = 0, rst_n = 0, op_done = 0, error = 0;
  logic [W-1:0] operand = '0;
  logic gating, aged;
  logic [$clog2(W+1)-1:0] zeros;
  int checks = 0, failures = 0;
  bit m_gating = 1, m_aged = 0;
  int m_ops = 0, m_errs = 0;
  int low_cycles = 0, n1_two_cycle_after_aging = 0, n1_one_cycle_before = 0;

  ahl #(.W(W), .JUDGE_N(N), .AGING_WINDOW(WIN), .AGING_THRESHOLD(THR)) dut (
    .clk, .rst_n, .operand, .op_done, .error, .gating, .aged, .zeros);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int zc(input logic [W-1:0] v);
    return W - $countones(v);
  endfunction

  always @(negedge clk) if (rst_n) begin
    m_gating = (zc(operand) > (m_aged ? N + 1 : N)) || !m_gating;
  end

  always @(posedge clk) if (rst_n) begin
    if (m_errs + int'(error) > THR) m_aged = 1;
    if (op_done && m_ops == WIN - 1) begin m_ops = 0; m_errs = 0; end
    else begin m_ops += int'(op_done); m_errs += int'(error); end
  end

  // random operand with a chosen number of zero bits
  function automatic logic [W-1:0] with_zeros(input int z);
    logic [W-1:0] v;
    v = '1;
    while (zc(v) < z) v[$urandom_range(0, W - 1)] = 1'b0;
    return v;
  endfunction

  // one operation: new operand after the rising edge, held while gating is 0
  task automatic op(input logic [W-1:0] v, input bit er);
    operand = v; op_done = 1'b0; error = er;
    do begin
      @(posedge clk); #1;
      error = 1'b0;
      checks++;
      if (gating !== m_gating || int'(zeros) != zc(operand) || aged !== m_aged) begin
        failures++;
        $display("FAIL at %0t operand=%h gating=%0b/%0b zeros=%0d aged=%0b/%0b",
                 $time, operand, gating, m_gating, zeros, aged, m_aged);
      end
      if (!gating) low_cycles++;
    end while (!gating);
    op_done = 1'b1;
    @(posedge clk); #1;
    op_done = 1'b0;
  endtask

  initial begin
    #12 rst_n = 1;
    @(posedge clk); #1;
    // fresh circuit: n+1 zeros is a one-cycle pattern
    for (int i = 0; i < 20; i++) begin
      logic [W-1:0] v;
      v = with_zeros(N + 1);
      operand = v;
      @(negedge clk); @(posedge clk); #1;
      checks++;
      if (gating !== 1'b1) begin failures++; $display("FAIL fresh %h judged two-cycle", v); end
      else n1_one_cycle_before++;
    end
    // two-cycle pattern: gating low for exactly one cycle
    operand = with_zeros(N - 2);
    @(negedge clk); #1;
    checks++;
    if (gating !== 1'b0) begin failures++; $display("FAIL two-cycle pattern did not gate"); end
    @(negedge clk); #1;
    checks++;
    if (gating !== 1'b1) begin failures++; $display("FAIL gating low for more than one cycle"); end
    // random patterns with occasional errors
    for (int i = 0; i < 300; i++) op(W'($urandom), ($urandom_range(0, 9) == 0));
    // make sure the indicator has tripped
    for (int i = 0; i < THR + 1; i++) op(W'($urandom), 1'b1);
    checks++;
    if (aged !== 1'b1) begin failures++; $display("FAIL aging indicator never tripped"); end
    // aged circuit: n+1 zeros is now a two-cycle pattern
    operand = '0;
    repeat (2) @(negedge clk);
    #1;
    for (int i = 0; i < 20; i++) begin
      operand = with_zeros(N + 1);
      @(negedge clk); #1;
      checks++;
      if (gating !== 1'b0) begin failures++; $display("FAIL aged %h judged one-cycle z=%0d n1=%0b aged=%0b", operand, zeros, dut.judge_n1, dut.aged); end
      else n1_two_cycle_after_aging++;
      @(negedge clk); #1;
    end
    checks++;
    if (low_cycles == 0) begin failures++; $display("FAIL no two-cycle operation seen"); end
    $display("two-cycle cycles %0d, n+1 one-cycle fresh %0d, two-cycle aged %0d",
             low_cycles, n1_one_cycle_before, n1_two_cycle_after_aging);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
