// tb_median3x3_workload: 3x3 median (sorting) filter on the full-size array.
//
// The image arrives column by column: three I/O ports carry the three pixels
// a, b, c of one column of the 3-row window. The 3x3 median is computed with
// the column-sort method:
//   1. sort each column:  n1 = min(a,b), n2 = max(a,b), lo = min(n1,c),
//      hi = max(n2,c), t = min(n2,c), mid = max(n1,t);
//   2. across the last three columns: L = max of the three lo,
//      H = min of the three hi, M = median of the three mid;
//   3. y = median(L, M, H), which equals the median of the nine pixels.
// Every node is one PE running the two-instruction compare program: SUB to
// set cc0 from the sign of a - b (peeking both operands), then CSEL popping
// both and sending max or min. Earlier columns come from one-word zero
// presets: a node fed the same stream on both inputs, with one zero word
// preset in its second queue, sees x[n] and x[n-1]; one PASS node delays the
// mid stream. The window is zero-padded before the first column.
// 19 compute PEs, 3 input I/O PEs and 1 output I/O PE (23 of 48), in
// clusters 0, 1, 2, 3, 6 and 7 joined over 13 level-2 buses:
//   cluster 0: PE 0 a in (port 0), PE 1 n1, PE 2 n2, PE 3 mid
//   cluster 1: PE 4 c in (port 1), PE 5 lo, PE 6 t, PE 7 hi
//   cluster 6: PE 24 b in (port 4), PE 25, PE 26 -> L
//   cluster 2: PE 8 mid delay, PE 9 p = min, PE 10 q = max, PE 11 min(q, mid[n-2])
//   cluster 7: PE 28 y out (port 5), PE 29, PE 30 -> H, PE 31 M = max(p, ...)
//   cluster 3: PE 12 min(L,M), PE 13 max(L,M), PE 14 min(., H), PE 15 y
// Checks every output against a reference that sorts the nine pixels, and
// the rate. Each node could take a column every two clocks, but the paths
// are not balanced. For example, lo and hi reach the last stage several
// node delays before mid's three-column median does. With two-word buffers,
// the early streams stall their senders. The mapping settles at one column
// per six clocks, and the testbench checks that exact period. Balancing the
// paths with PASS delay PEs would raise the rate; that was not done here.
module tb_median3x3_workload;
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
  localparam int PA = 0, PC = 1, PB = 4, PY = 5;   // I/O ports

  initial begin
    repeat (200000) @(posedge clk);
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

  // switch word of PE pe: DQ0 / DQ1 sources and data output bus
  task automatic route(int pe, int dq0, int dq1, int outb);
    pecfg_t p;
    p = '{cout_bus: OUT_NONE, out_bus: 3'(outb), cq1_sel: SEL_NONE, cq0_sel: SEL_NONE,
          dq2_sel: SEL_NONE, dq1_sel: 3'(dq1), dq0_sel: 3'(dq0)};
    sm.wr(48 + pe / 4, pe % 4, 40'(p));
  endtask

  // level-1 bus b of cluster cl drives (or receives) level-2 bus l2
  task automatic l2(int cl, int b, l2mode_e m, int l2b);
    sm.wr(48 + cl, 4 + b, 40'({m, 4'(l2b)}));
  endtask

  // compare node; preset = one zero word in DQ1 (previous sample)
  task automatic cmp_node(int pe, bit is_max, bit preset);
    sm.wr(pe, 0, ins(OP_SUB, 1, 3, CC_S, 1'b0, 1));
    if (is_max) sm.wr(pe, 1, ins(OP_CSEL, 2, 0, CC_KEEP, 1'b1, 0));   // a<b ? b : a
    else        sm.wr(pe, 1, ins(OP_CSEL, 0, 2, CC_KEEP, 1'b1, 0));   // a<b ? a : b
    if (preset) begin
      sm.wr(pe, 10, 40'd0);
      sm.wr(pe, 14, 40'h010);
    end
  endtask

  task automatic pass_node(int pe, bit preset);
    sm.wr(pe, 0, ins(OP_PASS, 0, SRC_ZERO, CC_KEEP, 1'b1, 0));
    if (preset) begin
      sm.wr(pe, 8, 40'd0);
      sm.wr(pe, 14, 40'h002);
    end
  endtask

  // reference: median of the nine pixels of the last three columns
  int cols[$][3];
  logic [15:0] expy[$];
  int nout = 0, first_out = -1, last_out = -1;

  function automatic int median9(int w[9]);
    int s[9];
    s = w;
    s.sort();
    return s[4];
  endfunction

  int qa[$], qb[$], qc[$];
  always @(posedge clk) begin
    if (io_in_valid[PA] && io_in_ready[PA]) qa.push_back(int'(io_in_data[PA]));
    if (io_in_valid[PB] && io_in_ready[PB]) qb.push_back(int'(io_in_data[PB]));
    if (io_in_valid[PC] && io_in_ready[PC]) qc.push_back(int'(io_in_data[PC]));
  end
  // columns are formed once all three pixels of one have been accepted
  always @(negedge clk) begin
    while (qa.size() && qb.size() && qc.size()) begin
      automatic int w[9];
      automatic int cur[3];
      cur = '{qa.pop_front(), qb.pop_front(), qc.pop_front()};
      cols.push_front(cur);
      for (int k = 0; k < 3; k++)
        for (int r = 0; r < 3; r++) w[3*k + r] = (k < cols.size()) ? cols[k][r] : 0;
      expy.push_back(16'(median9(w)));
    end
  end

  always @(posedge clk) begin
    if (io_out_valid[PY] && io_out_ready[PY]) begin
      chk(expy.size() > 0 && io_out_data[PY] == expy[0],
          $sformatf("y[%0d] = %0d exp %0d", nout, io_out_data[PY], expy.size() ? expy[0] : 0));
      if (expy.size()) void'(expy.pop_front());
      if (first_out < 0) first_out = int'($time / 10);
      last_out = int'($time / 10);
      nout++;
    end
  end

  task automatic feed(int port, int seed);
    for (int n = 0; n < NS; n++) begin
      io_in_valid[port] = 1'b1;
      io_in_data[port]  = 16'($urandom_range(0, 255));
      @(negedge clk);
      while (!io_in_ready[port]) @(negedge clk);
    end
    io_in_valid[port] = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    sm.reset_tap();
    sm.set_ir(4'h1);
    // inputs
    pass_node(0, 0);  route(0, SEL_NONE, SEL_NONE, 0);     // a, cluster 0 bus 0
    pass_node(24, 0); route(24, SEL_NONE, SEL_NONE, 0);    // b, cluster 6 bus 0
    pass_node(4, 0);  route(4, SEL_NONE, SEL_NONE, 0);     // c, cluster 1 bus 0
    l2(6, 0, L2_DRIVE, 3);  l2(0, 1, L2_RECV, 3);          // b -> cluster 0 bus 1
    // column sort
    cmp_node(1, 0, 0); route(1, 0, 1, 2);                  // n1 = min(a,b), bus 2
    cmp_node(2, 1, 0); route(2, 0, 1, 3);                  // n2 = max(a,b), bus 3
    l2(0, 2, L2_DRIVE, 0);  l2(1, 1, L2_RECV, 0);          // n1 -> cluster 1 bus 1
    l2(0, 3, L2_DRIVE, 1);  l2(1, 2, L2_RECV, 1);          // n2 -> cluster 1 bus 2
    cmp_node(5, 0, 0); route(5, 1, 0, 4);                  // lo = min(n1,c)
    cmp_node(6, 0, 0); route(6, 2, 0, 3);                  // t  = min(n2,c)
    cmp_node(7, 1, 0); route(7, 2, 0, 5);                  // hi = max(n2,c)
    l2(1, 3, L2_DRIVE, 2);  l2(0, 4, L2_RECV, 2);          // t -> cluster 0 bus 4
    cmp_node(3, 1, 0); route(3, 2, 4, 5);                  // mid = max(n1,t)
    // L = max of three lo
    l2(1, 4, L2_DRIVE, 4);  l2(6, 1, L2_RECV, 4);
    cmp_node(25, 1, 1); route(25, 1, 1, OUT_NONE);
    cmp_node(26, 1, 1); route(26, SEL_NEIGH, SEL_NEIGH, 2);
    // H = min of three hi
    l2(1, 5, L2_DRIVE, 5);  l2(7, 0, L2_RECV, 5);
    cmp_node(29, 0, 1); route(29, 0, 0, OUT_NONE);
    cmp_node(30, 0, 1); route(30, SEL_NEIGH, SEL_NEIGH, 4);
    // M = median of three mid
    l2(0, 5, L2_DRIVE, 6);  l2(2, 0, L2_RECV, 6);
    pass_node(8, 1);   route(8, 0, SEL_NONE, 1);           // mid[n-1] on bus 1
    cmp_node(9, 0, 0); route(9, 0, 1, 2);                  // p = min(mid[n], mid[n-1])
    cmp_node(10, 1, 0); route(10, 0, 1, OUT_NONE);         // q = max(mid[n], mid[n-1])
    cmp_node(11, 0, 1); route(11, SEL_NEIGH, 1, 3);        // min(q, mid[n-2])
    l2(2, 2, L2_DRIVE, 7);  l2(7, 1, L2_RECV, 7);
    l2(2, 3, L2_DRIVE, 8);  l2(7, 2, L2_RECV, 8);
    cmp_node(31, 1, 0); route(31, 1, 2, 3);                // M
    // y = median(L, M, H)
    l2(7, 3, L2_DRIVE, 9);  l2(3, 0, L2_RECV, 9);          // M
    l2(6, 2, L2_DRIVE, 10); l2(3, 1, L2_RECV, 10);         // L
    l2(7, 4, L2_DRIVE, 11); l2(3, 2, L2_RECV, 11);         // H
    cmp_node(12, 0, 0); route(12, 1, 0, 3);                // min(L,M)
    cmp_node(13, 1, 0); route(13, 1, 0, OUT_NONE);         // max(L,M)
    cmp_node(14, 0, 0); route(14, SEL_NEIGH, 2, OUT_NONE); // min(max(L,M), H)
    cmp_node(15, 1, 0); route(15, 3, SEL_NEIGH, 4);        // y
    l2(3, 4, L2_DRIVE, 12); l2(7, 5, L2_RECV, 12);
    pass_node(28, 0);  route(28, 5, SEL_NONE, OUT_EXT);    // y out
    sm.set_ir(4'h2);
    io_out_ready[PY] = 1'b1;
    fork
      feed(PA, 1);
      feed(PB, 2);
      feed(PC, 3);
      begin
        int t = 0;
        while (nout < NS && t < 20000) begin @(negedge clk); t++; end
      end
    join
    chk(nout == NS, $sformatf("outputs %0d of %0d", nout, NS));
    chk(last_out - first_out == 6 * (NS - 1),
        $sformatf("column period: %0d cycles for %0d columns, exp 6 each", last_out - first_out, NS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
