// tb_pe_ctrl: self-checking test of the PE local controller.
//
// Directed cases: zero-latency branch on the cc0 the instruction produces,
// branch on a control-queue head, stalls on an empty queue-mode operand,
// an empty control queue and a blocked output, operand pops, and holding the
// PC while stalled or halted.
module tb_pe_ctrl;
  import paddi_pkg::*;

  instr_t     ir;
  logic       ir_valid, run, cc0_next, out_free, cout_free, fire, stall;
  logic [2:0] pc, npc, dq_mode_rf, dq_nonempty, dq_pop;
  logic [1:0] cq_nonempty, cq_head, cq_pop;
  int checks = 0, failures = 0;

  pe_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(input logic f, input logic s, input logic [2:0] n,
                         input logic [2:0] dp, input logic [1:0] cp, input string what);
    #1;
    checks++;
    if (fire !== f || stall !== s || npc !== n || dq_pop !== dp || cq_pop !== cp) begin
      failures++;
      $display("FAIL %s: fire=%b stall=%b npc=%0d dq_pop=%b cq_pop=%b", what, fire, stall, npc, dq_pop, cq_pop);
    end
  endtask

  initial begin
    ir = '0;
    ir.op = OP_SUB; ir.sa = 3'd1; ir.sb = 3'd3; ir.dst = 3'd2; ir.wen = 1;
    ir.ccsel = CC_S; ir.bcond = BR_CC0; ir.next_t = 3'd0; ir.next_f = 3'd1;
    ir_valid = 1; run = 1; pc = 3'd1; dq_mode_rf = 3'b111; dq_nonempty = 3'b000;
    cq_nonempty = 0; cq_head = 0; cc0_next = 0; out_free = 1; cout_free = 1;
    expect_(1, 0, 3'd1, 3'b000, 2'b00, "cc0=0 falls to next_f");
    cc0_next = 1;
    expect_(1, 0, 3'd0, 3'b000, 2'b00, "cc0=1 takes next_t");
    run = 0;
    expect_(0, 0, 3'd1, 3'b000, 2'b00, "halted holds pc");
    run = 1; ir_valid = 0;
    expect_(0, 0, 3'd1, 3'b000, 2'b00, "no instruction");
    ir_valid = 1;
    // queue operands: sa = DQ0 head (pop), sb = DQ1 head peek (no pop)
    dq_mode_rf = 3'b000; ir.sa = 3'd0; ir.sb = 3'd3; dq_nonempty = 3'b001;
    expect_(0, 1, 3'd1, 3'b000, 2'b00, "stall on empty DQ1");
    dq_nonempty = 3'b011;
    expect_(1, 0, 3'd0, 3'b001, 2'b00, "pop DQ0 only");
    ir.op = OP_PASS; dq_nonempty = 3'b001;
    expect_(1, 0, 3'd0, 3'b001, 2'b00, "PASS ignores source b");
    ir.op = OP_BOOTH; ir.sc = 3'd4; dq_nonempty = 3'b011;
    expect_(0, 1, 3'd1, 3'b000, 2'b00, "BOOTH needs DQ2");
    dq_nonempty = 3'b111;
    expect_(1, 0, 3'd0, 3'b101, 2'b00, "BOOTH pops DQ0 and DQ2");
    // outputs
    ir.op = OP_ADD; ir.oen = 1; out_free = 0;
    expect_(0, 1, 3'd1, 3'b000, 2'b00, "blocked data output");
    out_free = 1; ir.coen = 1; cout_free = 0;
    expect_(0, 1, 3'd1, 3'b000, 2'b00, "blocked control output");
    cout_free = 1;
    // branch on control queue
    ir.bcond = BR_CQ1; ir.next_t = 3'd5; ir.next_f = 3'd6; cq_nonempty = 2'b01;
    expect_(0, 1, 3'd1, 3'b000, 2'b00, "stall on empty CQ1");
    cq_nonempty = 2'b10; cq_head = 2'b10;
    expect_(1, 0, 3'd5, 3'b001, 2'b10, "CQ1 true");
    cq_head = 2'b00;
    expect_(1, 0, 3'd6, 3'b001, 2'b10, "CQ1 false");
    ir.bcond = BR_ALWAYS;
    expect_(1, 0, 3'd5, 3'b001, 2'b00, "unconditional");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
