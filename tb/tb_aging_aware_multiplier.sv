// End-to-end test of aging_aware_multiplier at its default parameters
// (16 x 16 bits, column bypassing, n = 7, aging window 128 operations,
// threshold 8 errors).
//
// RTL simulation has no path delays, so the testbench supplies them: it
// drives the net between the Hamming encoder and the Razor stage itself,
// presenting each new code word only after a path delay that grows with the
// number of one bits of the bypass-steering operand (more ones, fewer
// bypassed adder stages):
//
//   delay = 13 ns + 0.85 ns * ones * age        (clock period 20 ns)
//
// With age = 1.00 (a fresh circuit) every pattern the AHL calls one-cycle
// (at most 8 ones) arrives within one period. After the first operations
// age becomes 1.15: patterns with exactly 8 ones then take about 20.8 ns,
// miss the clock edge and are caught by the Razor flip-flops. Once more than
// 8 such errors fall in one window the aging indicator trips, those patterns
// are judged two-cycle, and the errors stop. The shadow latches close 12 ns
// after each edge, before any new word can arrive, so Razor's short-path
// constraint holds.
//
// Checked: every product (reference: arithmetic product), product order,
// the cycles each operation spends in the operand registers (1 or 2, and 2
// after a Razor error), the two_cycle output, the reexecute output against
// the delay model, the aging indicator against a model of its counters,
// no errors after the indicator has tripped, and single-bit correction by
// the Hamming decoder (bits flipped on the net into the decoder), and the
// zero count the AHL reports. The first
// operation is 0x1000 * 0x1100. Each mechanism must occur at least once.
module tb_aging_aware_multiplier;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int M = 16, K = 32, R = 6, N = 38;
  localparam int JUDGE_N = 7, WINDOW = 128, THRESH = 8;
  localparam int NOPS = 1500;
  localparam int AGE_AFTER = 300;
  // 0: column bypassing (multiplicand steers), 1: row bypassing (multiplicator)
  localparam bit ROW = 0;

  logic clk = 0, clk_del, rst_n = 0, in_valid = 0;
  logic [M-1:0] md = '0, mr = '0;
  logic in_ready, product_valid, reexecute, two_cycle, aged;
  logic ecc_corrected, ecc_uncorrectable;
  logic [4:0] zero_count;
  logic [2*M-1:0] product;

  aging_aware_multiplier dut (
    .clk, .clk_del, .rst_n, .in_valid, .md, .mr, .in_ready, .product,
    .product_valid, .reexecute, .two_cycle, .aged, .ecc_corrected, .ecc_uncorrectable,
    .zero_count
  );

  always #10 clk = ~clk;
  assign #2 clk_del = clk;

  int checks = 0, failures = 0;
  int n_one = 0, n_two = 0, n_err = 0, n_err_after_aged = 0, n_aging_two = 0;
  int n_ecc = 0, n_idle = 0, n_results = 0, n_aged_switch = 0;
  int cycle = 0;

  initial begin
    repeat (NOPS * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] encode(input logic [K-1:0] v);
    logic [N-1:0] c;
    int j, x;
    c = '0; j = 0; x = 0;
    for (int p = 1; p <= N; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p-1] = v[j];
        if (v[j]) x ^= p;
        j++;
      end
    end
    for (int i = 0; i < R; i++) c[(1 << i) - 1] = x[i];
    return c;
  endfunction

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // the word the Razor stage sees, updated after each path delay
  logic [N-1:0] late_code = '0;
  real age = 1.0;

  task automatic launch(input logic [M-1:0] a, input logic [M-1:0] b, output real dly);
    logic [N-1:0] c;
    c = encode(K'(a) * K'(b));
    dly = 13.0 + 0.85 * $countones(ROW ? b : a) * age;
    fork
      begin
        #(dly) late_code = c;
      end
    join_none
  endtask

  // operation in the operand registers
  typedef struct {
    logic [M-1:0] a, b;
    bit           valid;
    real          launched, dly;
    bit           two;
  } op_t;

  op_t cur;
  logic [2*M-1:0] exp_q[$];
  int   held = 0;
  bit   pend_err = 0, prev_err = 0;
  int   m_ops = 0, m_errs = 0;
  bit   m_aged = 0;
  bit   accepted;
  bit   injected = 0;

  function automatic bit judged_two(input logic [M-1:0] a, input bit is_aged);
    return (M - $countones(a)) <= (is_aged ? JUDGE_N + 1 : JUDGE_N);
  endfunction

  // next operand: mixes of sparse, dense and plain random words
  function automatic logic [M-1:0] pick();
    case ($urandom_range(0, 3))
      0: return M'($urandom) & M'($urandom);
      1: return M'($urandom) | M'($urandom);
      default: return M'($urandom);
    endcase
  endfunction

  initial begin
    int ops_done;
    real d;
    force dut.razor_d = late_code;
    #25 rst_n = 1;
    @(posedge clk); #1;
    cur = '{a: '0, b: '0, valid: 0, launched: $realtime, dly: 13.0, two: 0};
    md = 16'h1000; mr = 16'h1100; in_valid = 1;
    ops_done = 0;
    while (ops_done < NOPS || exp_q.size() != 0) begin
      // one cycle: inputs were driven 1 ns after the edge; look 1 ns before the next edge
      #12;
      // single-bit error on the path into the decoder, now and then
      if (product_valid && exp_q.size() != 0 && $urandom_range(0, 24) == 0) begin
        logic [N-1:0] bad;
        bad = encode(exp_q[0]) ^ (N'(1) << $urandom_range(0, N - 1));
        force dut.dec_code = bad;
        injected = 1;
      end
      #6;
      cycle++;
      // aging indicator model and checks
      expect_true("aged matches the indicator model", aged == m_aged);
      expect_true("reexecute matches the delay model", reexecute == pend_err);
      expect_true("no uncorrectable code word", !ecc_uncorrectable);
      if (reexecute) begin
        n_err++;
        if (m_aged) n_err_after_aged++;
      end
      if (product_valid) begin
        logic [2*M-1:0] e;
        expect_true("a result is expected", exp_q.size() != 0);
        e = exp_q.pop_front();
        n_results++;
        if (product !== e) $display("  product %h expected %h", product, e);
        expect_true("product", product === e);
        if (ecc_corrected) n_ecc++;
        expect_true("correction flag matches the injected error", ecc_corrected == injected);
      end
      release dut.dec_code;
      injected = 0;
      held++;
      if (held == 1) expect_true("two_cycle output", two_cycle == cur.two);
      expect_true("zero count of the judged operand",
                  int'(zero_count) == M - $countones(ROW ? cur.b : cur.a));
      accepted = in_ready;
      if (accepted) begin
        int want;
        want = (cur.two || prev_err) ? 2 : 1;
        expect_true($sformatf("operation held %0d cycles, expected %0d", held, want), held == want);
        if (cur.valid) begin
          if (cur.two) n_two++; else n_one++;
          if (cur.two && m_aged && (M - $countones(ROW ? cur.b : cur.a)) == JUDGE_N + 1) n_aging_two++;
        end
      end
      // indicator model: counts on this edge
      if (m_errs + int'(reexecute) > THRESH) begin
        if (!m_aged) n_aged_switch++;
        m_aged = 1;
      end
      if (accepted && cur.valid && m_ops == WINDOW - 1) begin
        m_ops = 0; m_errs = 0;
      end else begin
        m_ops += int'(accepted && cur.valid);
        m_errs += int'(reexecute);
      end
      prev_err = reexecute;
      pend_err = 0;
      if (accepted) begin
        // the operation in the registers completes at this edge
        pend_err = (cur.dly > ($realtime + 1.0 - cur.launched));
      end
      @(posedge clk);
      if (accepted) begin
        launch(md, mr, d);
        cur = '{a: md, b: mr, valid: in_valid, launched: $realtime, dly: d,
                two: judged_two(ROW ? mr : md, m_aged)};
        if (in_valid) exp_q.push_back(K'(md) * K'(mr));
        else n_idle++;
        held = 0;
        if (in_valid) ops_done++;
        if (ops_done == AGE_AFTER) age = 1.15;
      end
      #1;
      if (accepted) begin
        in_valid = (ops_done < NOPS) && ($urandom_range(0, 15) != 0);
        md = pick(); mr = pick();
      end
    end
    $display("one-cycle %0d, two-cycle %0d (from aging %0d), razor errors %0d (after aging %0d),",
             n_one, n_two, n_aging_two, n_err, n_err_after_aged);
    $display("aging switches %0d, ecc corrections %0d, idle slots %0d, results %0d",
             n_aged_switch, n_ecc, n_idle, n_results);
    expect_true("one-cycle operations happened", n_one > 0);
    expect_true("two-cycle operations happened", n_two > 0);
    expect_true("razor errors and re-execution happened", n_err > 0);
    expect_true("aging indicator tripped", n_aged_switch == 1);
    expect_true("aging made n+1-zero patterns two-cycle", n_aging_two > 0);
    expect_true("no errors once aged", n_err_after_aged == 0);
    expect_true("ecc corrections happened", n_ecc > 0);
    expect_true("idle slots happened", n_idle > 0);
    expect_true("all results arrived", n_results == NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
