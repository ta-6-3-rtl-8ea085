// pe: one 16-bit processing element of the array.
//
// A PE runs a short local program (8 words of 40 bits) and talks to the rest
// of the array only through data and control streams, so it advances
// whenever its inputs are present and its outputs are free (data-driven
// execution, as in the source). Inside are three 2-word data buffers DQ0-DQ2
// (queue or register file), two control queues CQ0/CQ1, the 16-bit ALU with
// Booth step and conditional select, the program store and the local
// controller, as in the PE block diagram of the source.
//
// Pipeline: two stages, fetch and execute, every instruction one cycle. The
// instruction register holds the word at pc; when it fires, the word at the
// next PC (possibly a branch target chosen by this instruction's own result)
// is fetched in the same cycle, so taken branches cost nothing. After the
// program or the PC is preset, one cycle refetches the instruction register.
//
// Outputs: one 16-bit data channel and one 1-bit control channel, each a
// register with a valid bit. A value leaves when the network reports the
// transfer (out_accept / cout_accept: the bus handshake completed); an
// instruction that writes a channel still holding an unsent value stalls.
// Inputs: each buffer offers push_ready to the network and takes a word when
// the handshake completes (in_push).
//
// Configuration (download, preset, observation) is a word-addressed port; see
// paddi_pkg for the local map. The single result channel per PE, the control
// channel carrying cc0, and the configuration map are this design's choices.
module pe
  import paddi_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // configuration
  input  logic             cfg_we,
  input  logic [5:0]       cfg_local,
  input  logic [CFG_DW-1:0] cfg_wdata,
  output logic [CFG_DW-1:0] cfg_rdata,
  // data inputs (DQ0..DQ2)
  input  logic [2:0]       in_push,
  input  logic [2:0][15:0] in_data,
  output logic [2:0]       in_ready,
  // control inputs (CQ0, CQ1)
  input  logic [1:0]       cin_push,
  input  logic [1:0]       cin_data,
  output logic [1:0]       cin_ready,
  // data output
  output logic             out_valid,
  output logic [15:0]      out_data,
  input  logic             out_accept,
  // control output
  output logic             cout_valid,
  output logic             cout_data,
  input  logic             cout_accept,
  // activity
  output logic             fire,
  output logic             stall
);
  instr_t         ir;
  logic           ir_valid;
  logic [PCW-1:0] pc, npc;
  logic           cc0, carry_r;
  logic [39:0]    imem_rdata, imem_rdata2;

  // ---------------- buffers ----------------
  logic [2:0][15:0] dq_head, dq_w0, dq_w1;
  logic [2:0][1:0]  dq_count;
  logic [2:0]       dq_mode_rf, dq_pop, dq_rf_we, dq_cfg_we, dq_nonempty;
  logic [1:0][1:0]  cq_count;
  logic [1:0]       cq_head, cq_w0, cq_w1, cq_mode_rf, cq_pop, cq_cfg_we, cq_nonempty;
  logic [1:0]       cfg_idx_dq [3];
  logic [1:0]       cfg_idx_cq [2];
  logic [15:0]      result;
  flags_t           flags;
  logic             cc0_next;

  for (genvar q = 0; q < 3; q++) begin : g_dq
    pe_dq #(.WIDTH(16)) u_dq (
      .clk, .rst_n,
      .push_valid(in_push[q]), .push_data(in_data[q]), .push_ready(in_ready[q]),
      .pop(dq_pop[q]), .rf_we(dq_rf_we[q]), .rf_idx(ir.dst[0]), .rf_wdata(result),
      .head(dq_head[q]), .word0(dq_w0[q]), .word1(dq_w1[q]),
      .count(dq_count[q]), .mode_rf(dq_mode_rf[q]),
      .cfg_we(dq_cfg_we[q]), .cfg_idx(cfg_idx_dq[q]), .cfg_wdata(cfg_wdata[15:0]),
      .cfg_mode(cfg_wdata[3*q +: 3])
    );
    assign dq_nonempty[q] = (dq_count[q] != 2'd0);
    assign dq_rf_we[q]    = fire && ir.wen && ir.dst[2:1] == 2'(q) && ir.dst < 3'd6;
  end

  for (genvar q = 0; q < 2; q++) begin : g_cq
    pe_dq #(.WIDTH(1)) u_cq (
      .clk, .rst_n,
      .push_valid(cin_push[q]), .push_data(cin_data[q]), .push_ready(cin_ready[q]),
      .pop(cq_pop[q]), .rf_we(1'b0), .rf_idx(1'b0), .rf_wdata(1'b0),
      .head(cq_head[q]), .word0(cq_w0[q]), .word1(cq_w1[q]),
      .count(cq_count[q]), .mode_rf(cq_mode_rf[q]),
      .cfg_we(cq_cfg_we[q]), .cfg_idx(cfg_idx_cq[q]), .cfg_wdata(cfg_wdata[0]),
      .cfg_mode({cfg_wdata[10+3*q +: 2], 1'b0})
    );
    assign cq_nonempty[q] = (cq_count[q] != 2'd0);
  end

  // configuration decode
  always_comb begin
    for (int q = 0; q < 3; q++) begin
      dq_cfg_we[q]  = 1'b0;
      cfg_idx_dq[q] = 2'd0;
      if (cfg_we && cfg_local == 6'(8 + 2*q))     begin dq_cfg_we[q] = 1'b1; cfg_idx_dq[q] = 2'd0; end
      if (cfg_we && cfg_local == 6'(9 + 2*q))     begin dq_cfg_we[q] = 1'b1; cfg_idx_dq[q] = 2'd1; end
      if (cfg_we && cfg_local == 6'd14)           begin dq_cfg_we[q] = 1'b1; cfg_idx_dq[q] = 2'd2; end
    end
    for (int q = 0; q < 2; q++) begin
      cq_cfg_we[q]  = 1'b0;
      cfg_idx_cq[q] = 2'd0;
      if (cfg_we && cfg_local == 6'(17 + 2*q))    begin cq_cfg_we[q] = 1'b1; cfg_idx_cq[q] = 2'd0; end
      if (cfg_we && cfg_local == 6'(18 + 2*q))    begin cq_cfg_we[q] = 1'b1; cfg_idx_cq[q] = 2'd1; end
      if (cfg_we && cfg_local == 6'd14)           begin cq_cfg_we[q] = 1'b1; cfg_idx_cq[q] = 2'd2; end
    end
  end

  // ---------------- program store ----------------
  pe_imem #(.DEPTH(IDEPTH), .WIDTH(IW)) u_imem (
    .clk, .rst_n,
    .we(cfg_we && cfg_local < 6'd8), .waddr(cfg_local[2:0]), .wdata(cfg_wdata),
    .raddr(npc), .rdata(imem_rdata),
    .raddr2(cfg_local[2:0]), .rdata2(imem_rdata2)
  );

  // ---------------- operand fetch ----------------
  function automatic logic [15:0] src_val(input logic [2:0] code);
    logic [1:0] q;
    q = code[2:1];
    if (code == SRC_IMM)       return 16'(signed'(ir.imm));
    else if (code == SRC_ZERO) return 16'd0;
    else if (dq_mode_rf[q])    return code[0] ? dq_w1[q] : dq_w0[q];
    else                       return dq_head[q];
  endfunction

  logic [15:0] opa, opb, opc;
  assign opa = src_val(ir.sa);
  assign opb = src_val(ir.sb);
  assign opc = src_val(ir.sc);

  pe_alu u_alu (
    .op(ir.op), .a(opa), .b(opb), .c(opc), .digit(ir.imm[1:0]),
    .cc0(cc0), .carry_in(carry_r), .y(result), .flags(flags)
  );

  always_comb begin
    unique case (ir.ccsel)
      CC_KEEP: cc0_next = cc0;
      CC_S:    cc0_next = flags.s;
      CC_Z:    cc0_next = flags.z;
      CC_C:    cc0_next = flags.c;
    endcase
  end

  // ---------------- controller ----------------
  logic out_free, cout_free;
  assign out_free  = !out_valid  || out_accept;
  assign cout_free = !cout_valid || cout_accept;

  pe_ctrl u_ctrl (
    .ir, .ir_valid, .run, .pc,
    .dq_mode_rf, .dq_nonempty, .cq_nonempty, .cq_head,
    .cc0_next, .out_free, .cout_free,
    .fire, .stall, .npc, .dq_pop, .cq_pop
  );

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      ir         <= '0;
      ir_valid   <= 1'b0;
      cc0        <= 1'b0;
      carry_r    <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      cout_valid <= 1'b0;
      cout_data  <= 1'b0;
    end else begin
      if (cfg_we && cfg_local < 6'd8) begin
        ir_valid <= 1'b0;
      end else if (cfg_we && cfg_local == 6'd15) begin
        pc       <= cfg_wdata[2:0];
        cc0      <= cfg_wdata[3];
        ir_valid <= 1'b0;
      end else if (!ir_valid) begin
        ir       <= instr_t'(imem_rdata);   // npc == pc while nothing fires
        ir_valid <= 1'b1;
      end else if (fire) begin
        pc      <= npc;
        ir      <= instr_t'(imem_rdata);
        cc0     <= cc0_next;
        carry_r <= flags.c;
      end

      if (cfg_we && cfg_local == 6'd16) begin
        out_valid  <= 1'b0;
        cout_valid <= 1'b0;
      end else begin
        if (fire && ir.oen) begin
          out_valid <= 1'b1;
          out_data  <= result;
        end else if (out_accept) begin
          out_valid <= 1'b0;
        end
        if (fire && ir.coen) begin
          cout_valid <= 1'b1;
          cout_data  <= cc0_next;
        end else if (cout_accept) begin
          cout_valid <= 1'b0;
        end
      end
    end
  end

  // configuration read-back
  always_comb begin
    cfg_rdata = '0;
    if (cfg_local < 6'd8) cfg_rdata = imem_rdata2;
    else case (cfg_local)
      6'd8:  cfg_rdata[15:0] = dq_w0[0];
      6'd9:  cfg_rdata[15:0] = dq_w1[0];
      6'd10: cfg_rdata[15:0] = dq_w0[1];
      6'd11: cfg_rdata[15:0] = dq_w1[1];
      6'd12: cfg_rdata[15:0] = dq_w0[2];
      6'd13: cfg_rdata[15:0] = dq_w1[2];
      6'd14: cfg_rdata[14:0] = {cq_count[1], cq_mode_rf[1], cq_count[0], cq_mode_rf[0],
                                dq_count[2], dq_mode_rf[2], dq_count[1], dq_mode_rf[1],
                                dq_count[0], dq_mode_rf[0]};
      6'd15: cfg_rdata[4:0]  = {ir_valid, cc0, pc};
      6'd16: cfg_rdata[19:0] = {carry_r, cout_valid, cout_data, out_valid, out_data};
      6'd17: cfg_rdata[0]    = cq_w0[0];
      6'd18: cfg_rdata[0]    = cq_w1[0];
      6'd19: cfg_rdata[0]    = cq_w0[1];
      6'd20: cfg_rdata[0]    = cq_w1[1];
      default: ;
    endcase
  end

  // an output register is only released by a transfer when it holds a value
  a_out_accept: assert property (@(posedge clk) disable iff (!rst_n) out_accept |-> out_valid);
  a_cout_accept: assert property (@(posedge clk) disable iff (!rst_n) cout_accept |-> cout_valid);
endmodule
