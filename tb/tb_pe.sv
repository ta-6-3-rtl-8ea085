// tb_pe: self-checking test of one processing element.
//
// 1. The counter program of the PE assembler example: all three buffers as
//    register files, r1 = 10, r3 = 1,
//      START: r2 = sub(r1,r3), cc0 = s, next = cc0 ? START : LOOP
//      LOOP:  r2 = sub(r2,r3), cc0 = s, next = cc0 ? START : LOOP
//    r2 must count 9, 8, ..., 0, -1 and restart, one instruction per cycle.
// 2. Data-driven operation: DQ0/DQ1 as queues, out = in0 + in1 each time both
//    operands are present; random input arrival and random output back
//    pressure; the sums must come out in order and the PE must stall when an
//    operand is missing or the output is blocked.
// 3. Control stream: CQ0 selects between two instructions, and cc0 is sent
//    on the control output.
module tb_pe;
  import paddi_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0;
  logic        cfg_we = 0;
  logic [5:0]  cfg_local = 0;
  logic [39:0] cfg_wdata = 0, cfg_rdata;
  logic [2:0]  in_push = 0, in_ready;
  logic [2:0][15:0] in_data = '0;
  logic [1:0]  cin_push = 0, cin_data = 0, cin_ready;
  logic        out_valid, out_accept, cout_valid, cout_data, cout_accept;
  logic [15:0] out_data;
  logic        fire, stall;
  int checks = 0, failures = 0;

  pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] mk(alu_op_e op, int sa, int sb, int dst, bit wen, bit oen,
                                     bit coen, ccsel_e cc, bcond_e bc, int nt, int nf);
    instr_t i;
    i = '0;
    i.op = op; i.sa = 3'(sa); i.sb = 3'(sb); i.sc = SRC_ZERO; i.dst = 3'(dst); i.wen = wen;
    i.oen = oen; i.coen = coen; i.ccsel = cc; i.bcond = bc; i.next_t = 3'(nt); i.next_f = 3'(nf);
    return i;
  endfunction

  task automatic cfg(input int a, input logic [39:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_local = 6'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int exp_r2, stalls;
    logic [15:0] a_q[$], b_q[$], sums[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------- 1. counter ----------
    cfg(0, mk(OP_SUB, 1, 3, 2, 1, 0, 0, CC_S, BR_CC0, 0, 1));  // START
    cfg(1, mk(OP_SUB, 2, 3, 2, 1, 0, 0, CC_S, BR_CC0, 0, 1));  // LOOP
    cfg(14, 40'h0_0049);   // DQ0-2 register files
    cfg(9, 40'd10);        // r1
    cfg(11, 40'd1);        // r3
    cfg(15, 40'd0);        // pc = START
    cfg_local = 6'd10;     // observe r2
    @(negedge clk);        // refetch
    run = 1;
    @(negedge clk);
    exp_r2 = 9;
    for (int n = 0; n < 40; n++) begin
      chk($signed(cfg_rdata[15:0]) == 16'(exp_r2), $sformatf("counter r2=%0d exp %0d", $signed(cfg_rdata[15:0]), exp_r2));
      exp_r2 = (exp_r2 < 0) ? 9 : exp_r2 - 1;
      @(negedge clk);
    end
    run = 0;
    // ---------- 2. data-driven add ----------
    cfg(0, mk(OP_ADD, 0, 2, 0, 0, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0));
    cfg(14, 40'h0_0040);   // DQ0, DQ1 queues, DQ2 register file
    cfg(15, 40'd0);
    run = 1;
    stalls = 0;
    for (int n = 0; n < 600; n++) begin
      in_push[0] = in_ready[0] && ($urandom_range(0, 3) != 0);
      in_push[1] = in_ready[1] && ($urandom_range(0, 2) != 0);
      in_data[0] = 16'($urandom); in_data[1] = 16'($urandom);
      out_accept = out_valid && ($urandom_range(0, 2) != 0);
      #1;
      if (stall) stalls++;
      if (out_accept) begin
        chk(sums.size() > 0 && out_data == sums[0], "sum order");
        if (sums.size() > 0) void'(sums.pop_front());
      end
      @(posedge clk);
      if (in_push[0]) a_q.push_back(in_data[0]);
      if (in_push[1]) b_q.push_back(in_data[1]);
      if (fire) begin
        sums.push_back(a_q[0] + b_q[0]);
        void'(a_q.pop_front()); void'(b_q.pop_front());
      end
      @(negedge clk);
    end
    in_push = 0; out_accept = 0;
    chk(stalls > 20, "stalls happened");
    run = 0;
    // ---------- 3. control stream ----------
    //  0: r4 = pass(imm 5) ... use CQ0 head: true -> 1, false -> 2
    cfg(0, mk(OP_PASS, 7, 7, 5, 0, 0, 0, CC_KEEP, BR_CQ0, 1, 2));
    begin
      instr_t i;
      i = instr_t'(mk(OP_ADD, 4, 6, 4, 1, 0, 1, CC_Z, BR_ALWAYS, 0, 0)); i.imm = 10'd1;   // r4 += 1, send z
      cfg(1, i);
      i = instr_t'(mk(OP_ADD, 4, 6, 4, 1, 0, 1, CC_Z, BR_ALWAYS, 0, 0)); i.imm = -10'sd1; // r4 -= 1
      cfg(2, i);
    end
    cfg(14, 40'h0_0040);   // DQ2 register file, DQ0/DQ1 queues
    cfg(12, 40'd0);
    cfg(15, 40'd0);
    cfg(16, 40'd0);        // clear output channels
    run = 1;
    begin
      int exp_r4, sent;
      logic cbits[$];
      exp_r4 = 0; sent = 0;
      for (int n = 0; n < 300; n++) begin
        cin_push[0] = cin_ready[0] && ($urandom_range(0, 1) == 1);
        cin_data[0] = 1'($urandom);
        cout_accept = cout_valid;
        @(posedge clk);
        if (cin_push[0]) cbits.push_back(cin_data[0]);
        if (fire && dut.pc == 3'd0) begin
          exp_r4 += cbits[0] ? 1 : -1;
          void'(cbits.pop_front());
        end
        if (cout_accept) sent++;
        @(negedge clk);
      end
      cin_push = 0; cout_accept = 0;
      repeat (4) @(negedge clk);
      run = 0;
      cfg_local = 6'd12;
      #1;
      chk($signed(cfg_rdata[15:0]) == 16'(exp_r4), $sformatf("control stream r4=%0d exp %0d", $signed(cfg_rdata[15:0]), exp_r4));
      chk(sent > 20, "control output used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
