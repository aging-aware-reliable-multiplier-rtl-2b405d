// Self-checking test of row_bypass_multiplier at 16 x 16 bits: corner
// operands and random operands with varied multiplicator zero density, each product
// compared with the arithmetic product.
module tb_row_bypass_multiplier;
  localparam int W = 16;
  logic [W-1:0] md, mr;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;

  row_bypass_multiplier #(.W(W)) dut (.md, .mr, .product);

  task automatic check(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [2*W-1:0] ref_p;
    md = a; mr = b;
    #1;
    ref_p = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    checks++;
    if (product !== ref_p) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", a, b, product, ref_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0); check('1, '1); check('1, '0); check('0, '1);
    check(16'h1000, 16'h1100);
    check(16'h8000, 16'hFFFF); check(16'hFFFF, 16'h8001);
    for (int i = 0; i < 3000; i++) begin
      logic [W-1:0] a, b;
      a = W'($urandom); b = W'($urandom);
      if (i % 3 == 1) b &= W'($urandom);   // sparser multiplicator
      if (i % 3 == 2) b |= W'($urandom);   // denser multiplicator
      check(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
