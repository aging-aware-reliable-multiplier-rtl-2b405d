// Self-checking test of zero_judge: random and corner operands; the zero
// count and the threshold decision are compared with $countones.
module tb_zero_judge;
  localparam int W = 16;
  localparam int T = 7;
  logic [W-1:0] x;
  logic [$clog2(W+1)-1:0] zeros;
  logic more;
  int checks = 0, failures = 0;

  zero_judge #(.W(W), .THRESH(T)) dut (.x, .zeros, .more_zeros(more));

  task automatic check(input logic [W-1:0] v);
    int z;
    x = v;
    #1;
    z = W - $countones(v);
    checks++;
    if (int'(zeros) != z || more != (z > T)) begin
      failures++;
      $display("FAIL x=%h zeros=%0d more=%0b expected %0d %0b", v, zeros, more, z, z > T);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    check(16'h00FF);   // exactly 8 zeros
    check(16'h01FF);   // 7 zeros
    check(16'h007F);   // 9 zeros
    for (int i = 0; i < 2000; i++) check(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
