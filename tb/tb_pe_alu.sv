// tb_pe_alu: self-checking test of the PE ALU.
//
// Drives random operands through every operation and compares with results
// computed here with plain integer arithmetic. Chains four BOOTH steps
// (digits 0..3) and checks that they give floor(b*y/256) for a 16-bit b and an
// 8-bit signed y, the 16x8 multiplication the four-PE pipeline performs.
module tb_pe_alu;
  import paddi_pkg::*;

  alu_op_e     op;
  logic [15:0] a, b, c, y;
  logic [1:0]  digit;
  logic        cc0, carry_in;
  flags_t      flags;
  int checks = 0, failures = 0;

  pe_alu dut (.op, .a, .b, .c, .digit, .cc0, .carry_in, .y, .flags);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] exp_y, input logic exp_c, input string what);
    #1;
    checks++;
    if (y !== exp_y || flags.s !== exp_y[15] || flags.z !== (exp_y == 0) || flags.c !== exp_c) begin
      failures++;
      $display("FAIL %s op=%0d a=%h b=%h: y=%h flags=%b exp %h c=%b", what, op, a, b, y, flags, exp_y, exp_c);
    end
  endtask

  initial begin
    logic [16:0] s17;
    logic [15:0] e;
    cc0 = 0; carry_in = 0; digit = 0; c = 0;
    for (int n = 0; n < 400; n++) begin
      a = 16'($urandom); b = 16'($urandom); cc0 = 1'($urandom); carry_in = 1'($urandom);
      if (n < 4) begin a = 16'hFFFF; b = 16'(n); end  // carry chain through all blocks
      op = OP_ADD;  s17 = {1'b0, a} + {1'b0, b};            check(s17[15:0], s17[16], "add");
      op = OP_SUB;  s17 = {1'b0, a} + {1'b0, ~b} + 17'd1;    check(s17[15:0], s17[16], "sub");
      op = OP_ADDC; s17 = {1'b0, a} + {1'b0, b} + 17'(carry_in); check(s17[15:0], s17[16], "addc");
      op = OP_NEG;  s17 = {1'b0, ~a} + 17'd1;                check(s17[15:0], s17[16], "neg");
      op = OP_AND;  check(a & b, 0, "and");
      op = OP_OR;   check(a | b, 0, "or");
      op = OP_XOR;  check(a ^ b, 0, "xor");
      op = OP_PASS; check(a, 0, "pass");
      op = OP_NOT;  check(~a, 0, "not");
      op = OP_SHL;  check(a << b[3:0], 0, "shl");
      e = 16'($signed(a) >>> b[3:0]);
      op = OP_SHRA; check(e, 0, "shra");
      op = OP_SHRL; check(a >> b[3:0], 0, "shrl");
      op = OP_CSEL; check(cc0 ? a : b, 0, "csel");
    end
    // Booth: four chained steps give floor(b*y/256)
    for (int n = 0; n < 300; n++) begin
      int signed m, yy, prod, expv;
      logic [15:0] acc;
      m  = $signed(16'($urandom));
      yy = $signed(8'($urandom));
      if (n == 0) begin m = -32768; yy = -128; end
      if (n == 1) begin m = 32767;  yy = 127;  end
      b = 16'(m); c = 16'(yy); acc = 16'd0; op = OP_BOOTH;
      for (int i = 0; i < 4; i++) begin
        a = acc; digit = 2'(i); #1; acc = y;
      end
      prod = m * yy;
      expv = (prod >= 0) ? prod / 256 : -((-prod + 255) / 256);
      checks++;
      if ($signed(acc) !== 16'(expv)) begin
        failures++;
        $display("FAIL booth m=%0d y=%0d got %0d exp %0d", m, yy, $signed(acc), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
