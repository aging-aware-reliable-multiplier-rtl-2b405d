// Self-checking test of hamming_encoder for 32 data bits (38-bit code
// word). Two properties are checked independently of the block's loops:
// every data bit appears at its expected non-power-of-two position, and the
// XOR of the 1-based positions of all one bits of a valid code word is zero
// (which is what even parity over each check set amounts to).
module tb_hamming_encoder;
  localparam int K = 32, R = 6, N = 38;
  logic [K-1:0] data;
  logic [N-1:0] code;
  int checks = 0, failures = 0;

  hamming_encoder #(.K(K)) dut (.data, .code);

  // positions of the data bits: 3,5,6,7,9,...,15,17,...,31,33,...,38
  function automatic int data_pos(input int j);
    int p, n;
    n = -1;
    for (p = 1; p <= N; p++) begin
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32) n++;
      if (n == j) return p;
    end
    return -1;
  endfunction

  task automatic check(input logic [K-1:0] v);
    int x;
    bit ok;
    data = v;
    #1;
    x = 0;
    for (int p = 1; p <= N; p++) if (code[p-1]) x ^= p;
    ok = (x == 0);
    for (int j = 0; j < K; j++) if (code[data_pos(j) - 1] !== v[j]) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL data=%h code=%h position xor=%0d", v, code, x);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0); check('1);
    for (int j = 0; j < K; j++) check(K'(1) << j);
    // the product 0x1000 * 0x1100
    check(32'h0110_0000);
    for (int i = 0; i < 2000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
