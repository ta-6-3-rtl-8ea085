// tb_median3_workload: three-point median filter on the full-size array.
//
// A sorting (rank-order) filter is built from compare-exchange nodes, and on
// this array each node is a max or a min: a SUB that sets cc0 from the sign
// of a - b (peeking both operands), then a conditional select that pops both
// and sends the larger or the smaller one. This testbench maps the
// one-dimensional kernel of such a filter,
//   y[n] = median(x[n], x[n-1], x[n-2])
//        = max( min(a,b), min(max(a,b), c) ),  a = x[n], b = x[n-1], c = x[n-2]
// with x[-1] = x[-2] = 0. The delays are PASS nodes whose input queue is
// preset with one zero word through the scan port.
// Placement (clusters 0 and 1, joined over level-2 buses 4, 5 and 6):
//   PE 0  I/O port 0 in, x on cluster-0 bus 0 (broadcast to PEs 1, 2, 3)
//   PE 1  delay, b on cluster-0 bus 1 (broadcast to PEs 2, 3 and PE 5)
//   PE 2  max(a,b) on bus 2 -> PE 6      PE 3  min(a,b) on bus 3 -> PE 7
//   PE 5  delay, c to PE 6 over the neighbour path
//   PE 6  min(max(a,b), c) to PE 7 over the neighbour path
//   PE 7  max of the two, to I/O PE 4 over the neighbour wrap-around
//   PE 4  I/O port 1 out
// Checks every output in order against a reference computed here, and the
// rate: one output per two clocks (two instructions per compare node).
module tb_median3_workload;
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

  localparam int NS = 200;

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

  function automatic logic [39:0] ins(alu_op_e op, int sa, int sb, ccsel_e cs, bit oen, int nt);
    instr_t i;
    i = '{op: op, sa: 3'(sa), sb: 3'(sb), sc: 3'(SRC_ZERO), dst: 3'd0, wen: 1'b0, oen: oen,
          coen: 1'b0, ccsel: cs, bcond: BR_ALWAYS, next_t: 3'(nt), next_f: 3'(nt), imm: 10'd0};
    return 40'(i);
  endfunction

  function automatic logic [39:0] pcfg(int dq0, int dq1, int outb);
    pecfg_t p;
    p = '{cout_bus: OUT_NONE, out_bus: 3'(outb), cq1_sel: SEL_NONE, cq0_sel: SEL_NONE,
          dq2_sel: SEL_NONE, dq1_sel: 3'(dq1), dq0_sel: 3'(dq0)};
    return 40'(p);
  endfunction

  // compare node: peek a (DQ0) and b (DQ1), then pop both and send max or min
  task automatic cmp_node(int pe, bit is_max);
    sm.wr(pe, 0, ins(OP_SUB, 1, 3, CC_S, 1'b0, 1));
    if (is_max) sm.wr(pe, 1, ins(OP_CSEL, 2, 0, CC_KEEP, 1'b1, 0));   // a<b ? b : a
    else        sm.wr(pe, 1, ins(OP_CSEL, 0, 2, CC_KEEP, 1'b1, 0));   // a<b ? a : b
  endtask

  // delay node: PASS with one zero word preset in its DQ0 queue
  task automatic delay_node(int pe);
    sm.wr(pe, 0, ins(OP_PASS, 0, SRC_ZERO, CC_KEEP, 1'b1, 0));
    sm.wr(pe, 8, 40'd0);
    sm.wr(pe, 14, 40'h002);
  endtask

  function automatic int med3(int a, int b, int c);
    int lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    return (c < lo) ? lo : (c > hi) ? hi : c;
  endfunction

  int xs[$];
  logic [15:0] expy[$];
  int nout = 0, first_out = -1, last_out = -1;

  always @(posedge clk) begin
    if (io_in_valid[0] && io_in_ready[0]) begin
      xs.push_front($signed(io_in_data[0]));
      expy.push_back(16'(med3(xs[0], xs.size() > 1 ? xs[1] : 0, xs.size() > 2 ? xs[2] : 0)));
    end
    if (io_out_valid[1] && io_out_ready[1]) begin
      chk(expy.size() > 0 && io_out_data[1] == expy[0],
          $sformatf("y[%0d] = %0d exp %0d", nout, $signed(io_out_data[1]), expy.size() ? $signed(expy[0]) : 0));
      if (expy.size()) void'(expy.pop_front());
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
    sm.wr(0, 0, ins(OP_PASS, 0, SRC_ZERO, CC_KEEP, 1'b1, 0));
    delay_node(1);
    cmp_node(2, 1'b1);
    cmp_node(3, 1'b0);
    sm.wr(48, 0, pcfg(SEL_NONE, SEL_NONE, 0));   // pins -> DQ0, out on bus 0
    sm.wr(48, 1, pcfg(0, SEL_NONE, 1));
    sm.wr(48, 2, pcfg(0, 1, 2));
    sm.wr(48, 3, pcfg(0, 1, 3));
    sm.wr(48, 5, 40'({L2_DRIVE, 4'd4}));         // b
    sm.wr(48, 6, 40'({L2_DRIVE, 4'd5}));         // max(a,b)
    sm.wr(48, 7, 40'({L2_DRIVE, 4'd6}));         // min(a,b)
    // cluster 1
    sm.wr(4, 0, ins(OP_PASS, 0, SRC_ZERO, CC_KEEP, 1'b1, 0));
    delay_node(5);
    cmp_node(6, 1'b0);
    cmp_node(7, 1'b1);
    sm.wr(49, 4, 40'({L2_RECV, 4'd4}));
    sm.wr(49, 5, 40'({L2_RECV, 4'd5}));
    sm.wr(49, 6, 40'({L2_RECV, 4'd6}));
    sm.wr(49, 0, pcfg(SEL_NEIGH, SEL_NONE, OUT_EXT));
    sm.wr(49, 1, pcfg(0, SEL_NONE, OUT_NONE));
    sm.wr(49, 2, pcfg(1, SEL_NEIGH, OUT_NONE));
    sm.wr(49, 3, pcfg(2, SEL_NEIGH, OUT_NONE));
    sm.set_ir(4'h2);
    io_out_ready[1] = 1'b1;
    fork
      begin
        for (int n = 0; n < NS; n++) begin
          io_in_valid[0] = 1'b1;
          // small range so that a - b cannot overflow; some repeated values
          io_in_data[0]  = (n % 17 == 5) ? 16'd7 : 16'($signed(int'($urandom_range(0, 32000)) - 16000));
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
    chk(last_out - first_out == 2 * (NS - 1),
        $sformatf("sample period: %0d cycles for %0d samples, exp 2 each", last_out - first_out, NS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
