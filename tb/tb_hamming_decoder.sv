// Self-checking test of hamming_decoder for 32 data bits (38-bit code
// word). Code words are built in the testbench (data bits at the
// non-power-of-two positions, check bits chosen so that the XOR of the
// positions of all one bits is zero). Each word is decoded clean, with every
// single bit flipped in turn, and with two bits flipped whose syndrome
// points beyond the word. Data and status flags are compared.
module tb_hamming_decoder;
  localparam int K = 32, R = 6, N = 38;
  logic [N-1:0] code;
  logic [K-1:0] data;
  logic corrected, uncorrectable;
  int checks = 0, failures = 0;

  hamming_decoder #(.K(K)) dut (.code, .data, .corrected, .uncorrectable);

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

  task automatic check(input logic [N-1:0] c, input logic [K-1:0] exp,
                       input bit exp_corr, input bit exp_unc, input bit check_data);
    code = c;
    #1;
    checks++;
    if ((check_data && data !== exp) || corrected !== exp_corr || uncorrectable !== exp_unc) begin
      failures++;
      $display("FAIL code=%h data=%h exp=%h corr=%0b unc=%0b", c, data, exp, corrected, uncorrectable);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [K-1:0] v;
      logic [N-1:0] c;
      v = (i == 0) ? '0 : (i == 1) ? '1 : $urandom;
      c = encode(v);
      check(c, v, 0, 0, 1);
      for (int b = 0; b < N; b++) check(c ^ (N'(1) << b), v, 1, 0, 1);
      // positions 32 and 7 give syndrome 39, beyond the 38-bit word
      check(c ^ (N'(1) << 31) ^ (N'(1) << 6), v, 0, 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
