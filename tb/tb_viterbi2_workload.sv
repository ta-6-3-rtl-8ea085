// tb_viterbi2_workload: Viterbi detector kernel on the full-size array.
//
// A PRML read channel ends in a Viterbi detector built from add-compare-
// select (ACS) nodes and a register-exchange survivor memory. This testbench
// maps the smallest such detector, for the dicode (1-D) channel:
//   r[n] = A*(b[n] - b[n-1]) + noise,  b in {0,1},  state = previous bit.
// With the Euclidean metric, after dropping terms common to all branches and
// dividing by 2A, the branch metrics are 0, h - r and h + r (h = A/2), so
//   pm0' = min(pm0, pm1 + h + r)      d0 = (pm0 < pm1 + h + r)
//   pm1' = min(pm1, pm0 + h - r)      d1 = (pm1 < pm0 + h - r)
// Metrics wrap modulo 2^16; the sign of the 16-bit difference still orders
// them while they stay within 2^15 of each other, so no normalisation is
// needed.
// Each ACS is one PE running four instructions per sample (add h, add the
// other state's metric, SUB to set cc0 from the sign, CSEL). It keeps its own
// metric in a register, sends the new one to the other ACS and sends the
// decision d as a control token. Each register-exchange PE branches on that
// token (zero-latency branch on a control queue) to extend either its own
// survivor word or the other state's:
//   sv0' = (d0 ? sv0 : sv1) << 1,   sv1' = ((d1 ? sv1 : sv0) << 1) | 1
// Placement:
//   PE 0  I/O port 0 in, r on cluster-0 bus 0 to both ACS
//   PE 1  ACS state 1; metric to PE 2 by the neighbour path; decision over
//         control bus 0 and level-2 control bus 0 to PE 5
//   PE 2  ACS state 0; metric to PE 1 on bus 1; decision to PE 3 by the
//         neighbour path of the control network
//   PE 3  survivor of state 0, on bus 2 and level-2 bus 4 to PEs 4 and 5
//   PE 5  survivor of state 1, on level-2 bus 5 back to PE 3
//   PE 4  I/O port 1 out: every survivor word of state 0
// The initial metrics and survivor words are zero; the initial tokens on the
// two loops are preset into the receiving queues through the scan port.
// Checks every survivor word against a reference model, the decoded bit
// (bit 15 of the survivor, 15 samples late) against the transmitted bits,
// and the rate of one sample per four clocks (12.5 MHz at a 50 MHz clock).
module tb_viterbi2_workload;
  import paddi_pkg::*;

  logic clk = 0, rst_n = 0, tck, tms, tdi, tdo;
  logic [7:0] io_in_valid = 0, io_in_ready, io_out_valid, io_out_ready = 0;
  logic [7:0][15:0] io_in_data = '0, io_out_data;
  logic running;
  logic [47:0] pe_fire, pe_stall;
  int checks = 0, failures = 0;

  paddi2_top dut (.*);
  tb_scan_master sm (.clk, .tck, .tms, .tdi, .tdo);
  always #5 clk = ~clk;

  localparam int NS = 300;
  localparam int A  = 64;
  localparam int H  = A / 2;

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [39:0] ins(alu_op_e op, int sa, int sb, int dst, bit wen, bit oen,
                                      bit coen, ccsel_e cs, bcond_e bc, int nt, int nf, int imm);
    instr_t i;
    i = '{op: op, sa: 3'(sa), sb: 3'(sb), sc: 3'(SRC_ZERO), dst: 3'(dst), wen: wen, oen: oen,
          coen: coen, ccsel: cs, bcond: bc, next_t: 3'(nt), next_f: 3'(nf), imm: 10'(imm)};
    return 40'(i);
  endfunction

  function automatic logic [39:0] pcfg(int dq0, int dq1, int cq0, int outb, int coutb);
    pecfg_t p;
    p = '{cout_bus: 3'(coutb), out_bus: 3'(outb), cq1_sel: SEL_NONE, cq0_sel: 3'(cq0),
          dq2_sel: SEL_NONE, dq1_sel: 3'(dq1), dq0_sel: 3'(dq0)};
    return 40'(p);
  endfunction

  // ACS: DQ0 = r (queue), DQ1 = other metric (queue, one preset word),
  // r4 = own metric, r5 = candidate. state 0 adds h + r, state 1 adds h - r.
  task automatic acs_node(int pe, bit st1);
    if (st1) sm.wr(pe, 0, ins(OP_SUB, SRC_IMM, 0, 5, 1, 0, 0, CC_KEEP, BR_ALWAYS, 1, 1, H));
    else     sm.wr(pe, 0, ins(OP_ADD, 0, SRC_IMM, 5, 1, 0, 0, CC_KEEP, BR_ALWAYS, 1, 1, H));
    sm.wr(pe, 1, ins(OP_ADD, 5, 2, 5, 1, 0, 0, CC_KEEP, BR_ALWAYS, 2, 2, 0));
    sm.wr(pe, 2, ins(OP_SUB, 4, 5, 0, 0, 0, 0, CC_S, BR_ALWAYS, 3, 3, 0));
    sm.wr(pe, 3, ins(OP_CSEL, 4, 5, 4, 1, 1, 1, CC_KEEP, BR_ALWAYS, 0, 0, 0));
    sm.wr(pe, 10, 40'd0);      // other state's initial metric
    sm.wr(pe, 12, 40'd0);      // own initial metric
    sm.wr(pe, 14, 40'h050);    // DQ1 queue holding one word, DQ2 registers
  endtask

  // register exchange: DQ0 = other survivor (queue, one preset word),
  // r4 = own survivor, r5 = shifted other survivor; CQ0 = decision.
  task automatic re_node(int pe, bit st1);
    sm.wr(pe, 0, ins(OP_SHL, 0, SRC_IMM, 5, 1, 0, 0, CC_KEEP, BR_CQ0, 1, 2, 1));
    sm.wr(pe, 1, ins(OP_SHL, 4, SRC_IMM, 4, 1, !st1, 0, CC_KEEP, BR_ALWAYS, st1 ? 3 : 0, st1 ? 3 : 0, 1));
    sm.wr(pe, 2, ins(OP_PASS, 5, SRC_ZERO, 4, 1, !st1, 0, CC_KEEP, BR_ALWAYS, st1 ? 3 : 0, st1 ? 3 : 0, 0));
    sm.wr(pe, 3, ins(OP_OR, 4, SRC_IMM, 4, 1, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, 1));
    sm.wr(pe, 8, 40'd0);
    sm.wr(pe, 12, 40'd0);
    sm.wr(pe, 14, 40'h042);    // DQ0 queue holding one word, DQ2 registers
  endtask

  // reference detector, 16-bit arithmetic as in the array
  logic [15:0] pm0 = 0, pm1 = 0, sv0 = 0, sv1 = 0;
  logic [15:0] expsv[$];
  int bits[$];
  int nout = 0, first_out = -1, last_out = -1, bit_checks = 0;

  always @(posedge clk) begin
    if (io_in_valid[0] && io_in_ready[0]) begin
      automatic logic [15:0] r = io_in_data[0];
      automatic logic [15:0] c0 = pm1 + 16'(H) + r, c1 = pm0 + 16'(H) - r;
      automatic logic [15:0] t0 = pm0 - c0, t1 = pm1 - c1;
      automatic logic d0 = t0[15], d1 = t1[15];
      automatic logic [15:0] n0 = (d0 ? sv0 : sv1) << 1, n1 = ((d1 ? sv1 : sv0) << 1) | 16'd1;
      pm0 <= d0 ? pm0 : c0;
      pm1 <= d1 ? pm1 : c1;
      sv0 <= n0;
      sv1 <= n1;
      expsv.push_back(n0);
    end
    if (io_out_valid[1] && io_out_ready[1]) begin
      chk(expsv.size() > 0 && io_out_data[1] == expsv[0],
          $sformatf("survivor[%0d] = %h exp %h", nout, io_out_data[1], expsv.size() ? expsv[0] : 16'h0));
      if (expsv.size()) void'(expsv.pop_front());
      if (nout >= 20) begin
        chk(int'(io_out_data[1][15]) == bits[nout - 15], $sformatf("decoded bit %0d", nout - 15));
        bit_checks++;
      end
      if (first_out < 0) first_out = int'($time / 10);
      last_out = int'($time / 10);
      nout++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    sm.reset_tap();
    sm.set_ir(4'h1);
    // cluster 0
    sm.wr(0, 0, ins(OP_PASS, 0, SRC_ZERO, 0, 0, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, 0));
    acs_node(1, 1'b1);
    acs_node(2, 1'b0);
    re_node(3, 1'b0);
    sm.wr(48, 0, pcfg(SEL_NONE, SEL_NONE, SEL_NONE, 0, OUT_NONE));   // pins -> r on bus 0
    sm.wr(48, 1, pcfg(0, 1, SEL_NONE, OUT_NONE, 0));                 // ACS 1
    sm.wr(48, 2, pcfg(0, SEL_NEIGH, SEL_NONE, 1, OUT_NONE));         // ACS 0
    sm.wr(48, 3, pcfg(3, SEL_NONE, SEL_NEIGH, 2, OUT_NONE));         // survivor 0
    sm.wr(48, 6, 40'({L2_DRIVE, 4'd4}));
    sm.wr(48, 7, 40'({L2_RECV, 4'd5}));
    sm.wr(48, 10, 40'({L2_DRIVE, 4'd0}));                             // control bus 0
    // cluster 1
    sm.wr(4, 0, ins(OP_PASS, 0, SRC_ZERO, 0, 0, 1, 0, CC_KEEP, BR_ALWAYS, 0, 0, 0));
    re_node(5, 1'b1);
    sm.wr(49, 0, pcfg(0, SEL_NONE, SEL_NONE, OUT_EXT, OUT_NONE));
    sm.wr(49, 1, pcfg(0, SEL_NONE, 0, 1, OUT_NONE));
    sm.wr(49, 4, 40'({L2_RECV, 4'd4}));
    sm.wr(49, 5, 40'({L2_DRIVE, 4'd5}));
    sm.wr(49, 10, 40'({L2_RECV, 4'd0}));
    sm.set_ir(4'h2);
    io_out_ready[1] = 1'b1;
    fork
      begin
        int prev = 0;
        for (int n = 0; n < NS; n++) begin
          int b, noise;
          b = (n < 4) ? (n & 1) : int'($urandom_range(0, 1));
          noise = int'($urandom_range(0, 40)) - 20;
          bits.push_back(b);
          io_in_valid[0] = 1'b1;
          io_in_data[0]  = 16'(A * (b - prev) + noise);
          prev = b;
          @(negedge clk);
          while (!io_in_ready[0]) @(negedge clk);
        end
        io_in_valid[0] = 1'b0;
      end
      begin
        int t = 0;
        while (nout < NS && t < 20000) begin @(negedge clk); t++; end
      end
    join
    chk(nout == NS, $sformatf("outputs %0d of %0d", nout, NS));
    chk(bit_checks > 0, "decoded bits checked");
    chk(last_out - first_out == 4 * (NS - 1),
        $sformatf("sample period: %0d cycles for %0d samples, exp 4 each", last_out - first_out, NS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
