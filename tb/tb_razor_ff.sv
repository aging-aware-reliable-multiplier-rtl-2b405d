// Self-checking test of razor_ff. Clock period 20 ns; the delayed clock is
// clk shifted by 2 ns, so the shadow latch is open from 2 ns to 12 ns after
// each rising edge. Each operation is two cycles: a capture edge E with the
// enable set, then an edge with the enable clear. The new data bit arrives
// at E + a: early (a < 0) it is captured correctly; late (0 < a < 12) the
// main flip-flop keeps the old bit, error must rise once the shadow latch
// closes, and the bit must be repaired from the shadow latch on edge E + 20,
// even when the next data bit has already reached d by then.
module tb_razor_ff;
  logic clk = 0, clk_del, rst_n = 0, en = 0, d = 0;
  logic q, error;
  int checks = 0, failures = 0, late_errors = 0, repairs = 0;

  razor_ff dut (.clk, .clk_del, .rst_n, .en, .d, .q, .error);

  always #10 clk = ~clk;
  assign #2 clk_del = clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t %s = %0b expected %0b", $time, what, got, exp);
    end
  endtask

  // called at 1 ns after a rising edge; the capture edge E is 19 ns later
  task automatic op(input logic v, input int a);
    logic old;
    old = d;
    en = 1'b1;
    if (a < 0) begin
      #(19 + a) d = v;
      #(-a - 1);
    end else #19;
    // 1 ns before E: no error is pending
    expect_eq("error before capture", error, 1'b0);
    @(posedge clk);
    #1 en = 1'b0;
    if (a > 1) #(a - 1);
    if (a > 0) d = v;
    #(18 - (a > 1 ? a - 1 : 0));
    // 1 ns before E + 20: shadow has closed
    expect_eq("q after capture", q, (a < 0) ? v : old);
    expect_eq("error", error, (a > 0) && (v != old));
    if (error) late_errors++;
    // the next operation's data may already arrive before the repair edge
    d = 1'($urandom);
    @(posedge clk); #1;
    expect_eq("q after repair", q, v);
    expect_eq("error after repair", error, 1'b0);
    if (a > 0 && v != old) repairs++;
  endtask

  initial begin
    #15 rst_n = 1;
    @(posedge clk); #1;
    expect_eq("q after reset", q, 1'b0);
    for (int i = 0; i < 400; i++) begin
      int a;
      a = $urandom_range(0, 1) ? -int'($urandom_range(1, 15)) : int'($urandom_range(1, 9));
      op(1'($urandom), a);
    end
    // hold: with the enable clear the stored bit does not change
    d = ~q;
    repeat (3) begin
      @(posedge clk); #1;
      expect_eq("hold", q, ~d);
      expect_eq("no error while holding", error, 1'b0);
    end
    checks++;
    if (late_errors == 0 || repairs == 0) begin failures++; $display("FAIL no late data seen"); end
    $display("late-data errors %0d, repairs %0d", late_errors, repairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
