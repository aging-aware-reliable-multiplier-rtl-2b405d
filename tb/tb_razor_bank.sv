// Self-checking test of razor_bank with an 8-bit word. Clock period 20 ns,
// delayed clock shifted by 2 ns. Each operation is captured on an edge E
// with the enable set; the new word arrives either before E or up to 9 ns
// after it. A late word that differs from the old one must raise the error,
// keep valid low in that cycle and be repaired from the shadow latches on
// E + 20, with valid high afterwards. The enable is clear on the edge after
// each capture, so a repair is never overwritten.
module tb_razor_bank;
  localparam int W = 8;
  logic clk = 0, clk_del, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q;
  logic error, valid;
  int checks = 0, failures = 0, errors_seen = 0, on_time = 0;

  razor_bank #(.W(W)) dut (.clk, .clk_del, .rst_n, .en, .d, .q, .error, .valid);

  always #10 clk = ~clk;
  assign #2 clk_del = clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t %s = %h expected %h", $time, what, got, exp);
    end
  endtask

  // called 1 ns after a rising edge; the capture edge E is 19 ns later
  task automatic op(input logic [W-1:0] v, input int a);
    logic [W-1:0] old;
    bit late;
    old = d;
    late = (a > 0) && (v != old);
    en = 1'b1;
    if (a < 0) begin
      #(19 + a) d = v;
      #(-a - 1);
    end else #19;
    @(posedge clk);
    #1 en = 1'b0;
    if (a > 1) #(a - 1);
    if (a > 0) d = v;
    #(18 - (a > 1 ? a - 1 : 0));
    // 1 ns before E + 20
    expect_eq("q", q, (a < 0) ? v : old);
    expect_eq("error", W'(error), W'(late));
    expect_eq("valid", W'(valid), W'(!late));
    if (late) errors_seen++; else on_time++;
    // the next operation's word may already arrive before the repair edge
    d = W'($urandom);
    @(posedge clk); #1;
    expect_eq("q after E+20", q, v);
    expect_eq("error after E+20", W'(error), '0);
    // 1 ns before E + 40: a repaired word is valid, a held one is not
    #18;
    expect_eq("valid after E+20", W'(valid), W'(late));
    @(posedge clk); #1;
  endtask

  initial begin
    #15 rst_n = 1;
    @(posedge clk); #1;
    expect_eq("q after reset", q, '0);
    for (int i = 0; i < 400; i++) begin
      int a;
      a = $urandom_range(0, 1) ? -int'($urandom_range(1, 15)) : int'($urandom_range(1, 9));
      op(W'($urandom), a);
    end
    checks++;
    if (errors_seen == 0 || on_time == 0) begin failures++; $display("FAIL a case never happened"); end
    $display("late words %0d, on-time words %0d", errors_seen, on_time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
