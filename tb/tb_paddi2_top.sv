// tb_paddi2_top: end-to-end test of the 48-PE array through its pins only.
//
// Everything is configured through the 4-pin scan port, then three programs
// run at once on the full-size array:
//   A  16x8 multiply and clamp: x enters on I/O port 0 (PE 0), crosses the
//      level-2 network (data bus 3, left segment) to cluster 1, where it is
//      broadcast to four PEs that each perform one modified-Booth step on the
//      constant multiplier c held in a register file, passing the partial
//      product to the next PE over the neighbour path. The product
//      floor(x*c/256) crosses level-2 data bus 5 to cluster 11, whose I/O PE
//      computes max(y, 0) with a subtract and a conditional select and sends
//      it out on I/O port 7.
//   C  x enters on I/O port 2 (PE 16), y = (x ^ 255) + 1 is computed by PEs 16
//      and 20 and leaves on I/O port 3, using the right segment of the same
//      level-2 data bus 3, which a break switch separates from program A.
//   B  PE 36 runs the counter program of the assembler example and sends its
//      cc0 as a control stream over level-2 control bus 3 to PE 40, which
//      branches on it and counts the wrap-arounds out on I/O port 6.
// Before free running, PE 47 runs the counter program alone under single
// step, and its register r2 is read back through the scan port.
//
// Checks every output value in order, the counter period, and counts each
// mechanism (broadcast, neighbour path, both level-2 segments busy in the same
// cycle, stalls, pin back pressure, clamping, control-stream branches, single
// step); a mechanism that never occurs counts as a failure.
module tb_paddi2_top;
  import paddi_pkg::*;

  logic clk = 0, rst_n = 0, tck = 0, tms = 1, tdi = 0, tdo;
  logic [7:0] io_in_valid = 0, io_in_ready, io_out_valid, io_out_ready = 0;
  logic [7:0][15:0] io_in_data = '0, io_out_data;
  logic running;
  logic [47:0] pe_fire, pe_stall;
  int checks = 0, failures = 0;

  paddi2_top dut (.*);
  always #5 clk = ~clk;

  localparam int NA = 150, NC = 150;
  localparam logic signed [7:0] COEF = -8'sd93;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- scan port master ----------------
  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (3) @(negedge clk);
    o = tdo;
    tck = 1;
    repeat (3) @(negedge clk);
    tck = 0;
  endtask

  task automatic shift_ir(input logic [3:0] v);
    logic o;
    tclk(1, 0, o); tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);
    for (int i = 0; i < 4; i++) tclk(i == 3, v[i], o);
    tclk(1, 0, o); tclk(0, 0, o);
  endtask

  task automatic shift_dr(input int n, input logic [52:0] v, output logic [52:0] cap);
    logic o;
    cap = '0;
    tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);
    for (int i = 0; i < n; i++) begin tclk(i == n - 1, v[i], o); cap[i] = o; end
    tclk(1, 0, o); tclk(0, 0, o);
  endtask

  task automatic wr(input int unit, input int lcl, input logic [39:0] d);
    logic [52:0] cap;
    shift_dr(53, {1'b1, 6'(unit), 6'(lcl), d}, cap);
  endtask

  task automatic rd(input int unit, input int lcl, output logic [39:0] d);
    logic [52:0] cap;
    shift_dr(53, {1'b0, 6'(unit), 6'(lcl), 40'd0}, cap);
    shift_dr(53, {1'b0, 6'(unit), 6'(lcl), 40'd0}, cap);
    d = cap[39:0];
  endtask

  // ---------------- program helpers ----------------
  function automatic logic [39:0] ins(alu_op_e op, int sa, int sb, int sc, int dst, bit wen,
                                      bit oen, bit coen, ccsel_e cc, bcond_e bc, int nt, int nf,
                                      int imm);
    instr_t i;
    i = '{op: op, sa: 3'(sa), sb: 3'(sb), sc: 3'(sc), dst: 3'(dst), wen: wen, oen: oen,
          coen: coen, ccsel: cc, bcond: bc, next_t: 3'(nt), next_f: 3'(nf), imm: 10'(imm)};
    return 40'(i);
  endfunction

  function automatic logic [39:0] pcfg(int dq0, int dq1, int dq2, int cq0, int outb, int coutb);
    pecfg_t p;
    p = '{cout_bus: 3'(coutb), out_bus: 3'(outb), cq1_sel: SEL_NONE, cq0_sel: 3'(cq0),
          dq2_sel: 3'(dq2), dq1_sel: 3'(dq1), dq0_sel: 3'(dq0)};
    return 40'(p);
  endfunction

  function automatic logic [39:0] l2c(l2mode_e m, int sel);
    return 40'({m, 4'(sel)});
  endfunction

  localparam int N = SEL_NONE, NB = SEL_NEIGH;

  // ---------------- traffic and scoreboards ----------------
  logic [15:0] expA[$], expC[$];
  int nA_in = 0, nC_in = 0, nA_out = 0, nC_out = 0, nB_out = 0;
  int m_stall = 0, m_backpressure = 0, m_clamp = 0, m_seg_both = 0, m_neigh = 0, m_bcast = 0;
  int lastB = -1, periodB = 0, expB = 1;
  bit traffic = 0;

  always @(posedge clk) begin
    if (running && |pe_stall) m_stall++;
    if (io_in_valid[0] && !io_in_ready[0]) m_backpressure++;
    if (dut.d_hs[0][0] && dut.d_hs[4][0]) m_seg_both++;
    if (dut.g_cl[1].u_cl.pe_in_push[1][0]) m_neigh++;
    if (dut.g_cl[1].u_cl.d_l2_hs[0]) m_bcast++;
    if (io_in_valid[0] && io_in_ready[0]) begin
      automatic int signed p = $signed(io_in_data[0]) * COEF;
      automatic int signed y = (p >= 0) ? p / 256 : -((-p + 255) / 256);
      if (y < 0) m_clamp++;
      expA.push_back(16'((y < 0) ? 0 : y));
      nA_in++;
    end
    if (io_in_valid[2] && io_in_ready[2]) begin
      expC.push_back((io_in_data[2] ^ 16'h00FF) + 16'd1);
      nC_in++;
    end
    if (io_out_valid[7] && io_out_ready[7]) begin
      chk(expA.size() > 0 && io_out_data[7] == expA[0],
          $sformatf("program A out %h exp %h", io_out_data[7], expA.size() ? expA[0] : 16'hx));
      if (expA.size()) void'(expA.pop_front());
      nA_out++;
    end
    if (io_out_valid[3] && io_out_ready[3]) begin
      chk(expC.size() > 0 && io_out_data[3] == expC[0], "program C out");
      if (expC.size()) void'(expC.pop_front());
      nC_out++;
    end
    if (io_out_valid[6] && io_out_ready[6]) begin
      chk(io_out_data[6] == 16'(expB), $sformatf("program B count %0d exp %0d", io_out_data[6], expB));
      expB++;
      if (lastB >= 0) periodB = int'($time / 10) - lastB;
      lastB = int'($time / 10);
      nB_out++;
    end
  end

  // input drivers: random valid, hold until accepted
  always @(negedge clk) begin
    if (traffic) begin
      if (!io_in_valid[0] || io_in_ready[0]) begin
        io_in_valid[0] = (nA_in < NA) && ($urandom_range(0, 3) != 0);
        io_in_data[0]  = 16'($urandom);
      end
      if (!io_in_valid[2] || io_in_ready[2]) begin
        io_in_valid[2] = (nC_in < NC) && ($urandom_range(0, 2) != 0);
        io_in_data[2]  = 16'($urandom);
      end
      io_out_ready[7] = ($urandom_range(0, 4) != 0);
      io_out_ready[3] = ($urandom_range(0, 1) != 0);
      io_out_ready[6] = 1'b1;
    end
  end

  initial begin
    logic [39:0] d;
    int steps;
    repeat (3) @(negedge clk);
    rst_n = 1;
    begin logic o; repeat (5) tclk(1, 0, o); tclk(0, 0, o); end
    shift_ir(4'h1);   // CFG
    // ----- program A -----
    wr(0, 0, ins(OP_PASS, 0, 7, 7, 0, 0, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, 0));
    wr(48, 0, pcfg(N, N, N, N, 0, OUT_NONE));
    wr(48, 4, l2c(L2_DRIVE, 3));
    for (int k = 0; k < 4; k++) begin
      wr(4 + k, 0, ins(OP_BOOTH, (k == 0) ? 7 : 0, 2, 4, 0, 0, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, k));
      wr(4 + k, 14, 40'h040);                     // DQ2 register file
      wr(4 + k, 12, 40'(COEF));                   // r4 = multiplier
      wr(49, k, pcfg((k == 0) ? N : NB, 0, N, N, (k == 3) ? 1 : OUT_NONE, OUT_NONE));
    end
    wr(49, 4, l2c(L2_RECV, 3));
    wr(49, 5, l2c(L2_DRIVE, 5));
    wr(59, 5, l2c(L2_RECV, 5));
    wr(59, 0, pcfg(1, N, N, N, OUT_EXT, OUT_NONE));
    wr(44, 0, ins(OP_SUB, 1, 7, 7, 0, 0, 0, 0, CC_S, BR_ALWAYS, 1, 1, 0));
    wr(44, 1, ins(OP_CSEL, 7, 0, 7, 0, 0, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, 0));
    // ----- program C -----
    wr(16, 0, ins(OP_XOR, 0, 6, 7, 0, 0, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, 255));
    wr(52, 0, pcfg(N, N, N, N, 0, OUT_NONE));
    wr(52, 4, l2c(L2_DRIVE, 3));
    wr(53, 4, l2c(L2_RECV, 3));
    wr(53, 0, pcfg(0, N, N, N, OUT_EXT, OUT_NONE));
    wr(20, 0, ins(OP_ADD, 0, 6, 7, 0, 0, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, 1));
    wr(60, 0, 40'h40);                            // open data bus 3 at break point 0
    // ----- program B -----
    wr(36, 0, ins(OP_SUB, 1, 3, 7, 2, 1, 0, 1, CC_S, BR_CC0, 0, 1, 0));  // START
    wr(36, 1, ins(OP_SUB, 2, 3, 7, 2, 1, 0, 1, CC_S, BR_CC0, 0, 1, 0));  // LOOP
    wr(36, 14, 40'h049);
    wr(36, 9, 40'd10);
    wr(36, 11, 40'd1);
    wr(57, 0, pcfg(N, N, N, N, OUT_NONE, 0));
    wr(57, 10, l2c(L2_DRIVE, 3));
    wr(58, 10, l2c(L2_RECV, 3));
    wr(58, 0, pcfg(N, N, N, 0, OUT_EXT, OUT_NONE));
    wr(40, 0, ins(OP_PASS, 7, 7, 7, 0, 0, 0, 0, CC_KEEP, BR_CQ0, 1, 0, 0));
    wr(40, 1, ins(OP_ADD, 0, 6, 7, 0, 1, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, 1));
    wr(40, 14, 40'h001);
    // ----- PE 47: counter under single step -----
    wr(47, 0, ins(OP_SUB, 1, 3, 7, 2, 1, 0, 0, CC_S, BR_CC0, 0, 1, 0));
    wr(47, 1, ins(OP_SUB, 2, 3, 7, 2, 1, 0, 0, CC_S, BR_CC0, 0, 1, 0));
    wr(47, 14, 40'h049);
    wr(47, 9, 40'd10);
    wr(47, 11, 40'd1);
    wr(47, 15, 40'd0);
    // read back
    rd(36, 1, d);
    chk(d == ins(OP_SUB, 2, 3, 7, 2, 1, 0, 1, CC_S, BR_CC0, 0, 1, 0), "program read-back");
    rd(59, 5, d);
    chk(d == l2c(L2_RECV, 5), "switch read-back");
    // ----- single step -----
    shift_ir(4'h4);
    steps = 0;
    for (int n = 0; n < 5; n++) begin logic [52:0] c; shift_dr(1, 53'd0, c); steps++; end
    shift_ir(4'h1);
    rd(47, 10, d);
    chk($signed(d[15:0]) == 16'sd5, $sformatf("5 steps: r2=%0d exp 5", $signed(d[15:0])));
    shift_ir(4'h4);
    for (int n = 0; n < 8; n++) begin logic [52:0] c; shift_dr(1, 53'd0, c); steps++; end
    shift_ir(4'h1);
    rd(47, 10, d);
    chk($signed(d[15:0]) == 16'sd8, $sformatf("13 steps: r2=%0d exp 8", $signed(d[15:0])));
    // ----- free run -----
    shift_ir(4'h2);
    chk(running, "running");
    traffic = 1;
    begin
      int t;
      t = 0;
      while ((nA_out < NA || nC_out < NC) && t < 20000) begin @(negedge clk); t++; end
    end
    traffic = 0;
    shift_ir(4'h3);
    chk(!running, "halted");
    chk(nA_out == NA && nC_out == NC, $sformatf("outputs A %0d C %0d", nA_out, nC_out));
    chk(nB_out > 20, $sformatf("control-stream outputs %0d", nB_out));
    chk(periodB == 12, $sformatf("counter wrap period %0d cycles, exp 12", periodB));
    $display("mechanisms: stall=%0d backpressure=%0d clamp=%0d seg_both=%0d neighbour=%0d broadcast=%0d ctrl_branch=%0d single_step=%0d",
             m_stall, m_backpressure, m_clamp, m_seg_both, m_neigh, m_bcast, nB_out, steps);
    chk(m_stall > 0, "stall seen");
    chk(m_backpressure > 0, "pin back pressure seen");
    chk(m_clamp > 0 && m_clamp < NA, "conditional select both ways");
    chk(m_seg_both > 0, "both level-2 segments in one cycle");
    chk(m_neigh > 0, "neighbour path");
    chk(m_bcast > 0, "broadcast");
    chk(steps == 13, "single step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
