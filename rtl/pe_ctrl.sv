// pe_ctrl: local controller of a PE (control logic and next-PC unit).
//
// Each cycle it decides whether the instruction in the execute stage can fire.
// Following the source, the PE stalls when an operand it needs is missing
// (a queue-mode data buffer that is empty, or an empty control queue that the
// branch tests) or when an output channel it writes is still blocked by the
// previous value. When the instruction fires, the next PC is next_t or next_f
// of the instruction, chosen by the branch condition: always true, the cc0
// value this same instruction produces, or the head of control queue CQ0/CQ1.
// Because the condition is taken from the executing instruction itself and the
// next word is fetched in the same cycle, a branch costs no extra cycle
// (zero-latency branch). When it stalls, the PC stays put.
//
// Combinational. Which operands an operation reads, and the encoding of the
// branch field, are this design's choices (see paddi_pkg).
module pe_ctrl
  import paddi_pkg::*;
(
  input  instr_t         ir,
  input  logic           ir_valid,   // instruction register holds the word at pc
  input  logic           run,        // array running (or single step)
  input  logic [PCW-1:0] pc,
  input  logic [2:0]     dq_mode_rf,
  input  logic [2:0]     dq_nonempty,
  input  logic [1:0]     cq_nonempty,
  input  logic [1:0]     cq_head,
  input  logic           cc0_next,   // cc0 after this instruction
  input  logic           out_free,   // data output register can take a word
  input  logic           cout_free,  // control output register can take a bit
  output logic           fire,
  output logic           stall,      // instruction present but blocked
  output logic [PCW-1:0] npc,
  output logic [2:0]     dq_pop,
  output logic [1:0]     cq_pop
);
  logic       use_b, use_c;
  logic [2:0] need_dq, pop_dq;
  logic       need_cq0, need_cq1, cond, ok;

  always_comb begin
    use_b = !(ir.op inside {OP_PASS, OP_NOT, OP_NEG});
    use_c = (ir.op == OP_BOOTH);
    need_dq = '0;
    pop_dq  = '0;
    // a queue-mode buffer is needed when a used source names it
    for (int q = 0; q < 3; q++) begin
      if (!dq_mode_rf[q]) begin
        if (ir.sa[2:1] == 2'(q) && ir.sa < 3'd6) begin
          need_dq[q] = 1'b1; pop_dq[q] |= !ir.sa[0];
        end
        if (use_b && ir.sb[2:1] == 2'(q) && ir.sb < 3'd6) begin
          need_dq[q] = 1'b1; pop_dq[q] |= !ir.sb[0];
        end
        if (use_c && ir.sc[2:1] == 2'(q) && ir.sc < 3'd6) begin
          need_dq[q] = 1'b1; pop_dq[q] |= !ir.sc[0];
        end
      end
    end
    need_cq0 = (ir.bcond == BR_CQ0);
    need_cq1 = (ir.bcond == BR_CQ1);

    ok = ((need_dq & ~dq_nonempty) == 3'b000)
      && (!need_cq0 || cq_nonempty[0])
      && (!need_cq1 || cq_nonempty[1])
      && (!ir.oen  || out_free)
      && (!ir.coen || cout_free);

    fire  = run && ir_valid && ok;
    stall = run && ir_valid && !ok;

    unique case (ir.bcond)
      BR_ALWAYS: cond = 1'b1;
      BR_CC0:    cond = cc0_next;
      BR_CQ0:    cond = cq_head[0];
      BR_CQ1:    cond = cq_head[1];
    endcase

    npc    = fire ? (cond ? ir.next_t : ir.next_f) : pc;
    dq_pop = fire ? pop_dq : 3'b000;
    cq_pop = fire ? {need_cq1, need_cq0} : 2'b00;
  end
endmodule
