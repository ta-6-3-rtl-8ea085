// tb_csel_adder: self-checking test of the 16-bit carry-select adder.
//
// Random operands plus operands built to send a carry across every block
// boundary, with both carry-in values, checked against a 17-bit sum.
module tb_csel_adder;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  csel_adder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] e;
    a = x; b = y; cin = c; #1;
    e = {1'b0, x} + {1'b0, y} + 17'(c);
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, exp %h", x, y, c, {cout, sum}, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      try_(16'hFFFF >> (15 - i), 16'd1, 1'b0);   // carry ripples up to bit i
      try_(16'hFFFF >> (15 - i), 16'd0, 1'b1);
      try_(16'(1 << i), 16'(1 << i), 1'b0);
    end
    for (int n = 0; n < 5000; n++) try_(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
