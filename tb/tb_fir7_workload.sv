// tb_fir7_workload: 7-tap transversal filter on the full-size array.
//
// The equalizer of the Viterbi-detector benchmark is a 7-tap transversal
// filter. Here it is mapped in transposed form, one tap per PE:
//   s6[n] = p6[n],  sk[n] = pk[n] + s(k+1)[n-1],  y[n] = s0[n],
//   pk[n] = floor(ck * x[n] / 256)   (16-bit x, 8-bit signed ck)
// Each tap PE holds ck in a register and forms pk with four sequential
// modified-Booth steps (digits 0..3) on the broadcast sample, then adds the
// partial sum arriving from the next tap: five instructions per sample.
// The initial s(k+1)[-1] = 0 is a word preset into each tap's DQ0 queue
// through the scan port.
// Placement: x enters on I/O port 0 (PE 0) and is broadcast over level-2
// data bus 3 to clusters 2 and 3; taps 6..3 are PEs 8..11, taps 2..0 are
// PEs 12..14; partial sums move over the neighbour path and, from PE 11 to
// PE 12, over level-2 bus 7; y leaves PE 14 over level-2 bus 9 to the I/O
// PE 20 and the pins of I/O port 3.
// Checks every y in order against a reference computed here, and the
// sample rate: one output per five clocks once the pipeline is full.
module tb_fir7_workload;
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

  localparam int NS = 120;
  localparam logic signed [7:0] C [7] = '{8'sd12, -8'sd40, 8'sd127, 8'sd90, -8'sd128, 8'sd33, -8'sd7};

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

  function automatic logic [39:0] ins(alu_op_e op, int sa, int sb, int sc, int dst, bit wen,
                                      bit oen, int nt, int imm);
    instr_t i;
    i = '{op: op, sa: 3'(sa), sb: 3'(sb), sc: 3'(sc), dst: 3'(dst), wen: wen, oen: oen,
          coen: 1'b0, ccsel: CC_KEEP, bcond: BR_ALWAYS, next_t: 3'(nt), next_f: 3'(nt), imm: 10'(imm)};
    return 40'(i);
  endfunction

  function automatic logic [39:0] pcfg(int dq0, int dq1, int outb);
    pecfg_t p;
    p = '{cout_bus: OUT_NONE, out_bus: 3'(outb), cq1_sel: SEL_NONE, cq0_sel: SEL_NONE,
          dq2_sel: SEL_NONE, dq1_sel: 3'(dq1), dq0_sel: 3'(dq0)};
    return 40'(p);
  endfunction

  function automatic int fdiv256(int p);
    return (p >= 0) ? p / 256 : -((-p + 255) / 256);
  endfunction

  int xs[$];
  logic [15:0] expy[$];
  int nin = 0, nout = 0, first_out = -1, last_out = -1;

  always @(posedge clk) begin
    if (io_in_valid[0] && io_in_ready[0]) begin
      automatic int acc = 0;
      xs.push_front($signed(io_in_data[0]));
      for (int k = 0; k < 7; k++) if (k < xs.size()) acc += fdiv256(int'(C[k]) * xs[k]);
      expy.push_back(16'(acc));
      nin++;
    end
    if (io_out_valid[3] && io_out_ready[3]) begin
      chk(expy.size() > 0 && io_out_data[3] == expy[0],
          $sformatf("y[%0d] = %0d exp %0d", nout, $signed(io_out_data[3]), expy.size() ? $signed(expy[0]) : 0));
      if (expy.size()) void'(expy.pop_front());
      if (first_out < 0) first_out = int'($time / 10);
      last_out = int'($time / 10);
      nout++;
    end
  end

  initial begin
    int pe_of_tap [7];
    pe_of_tap = '{14, 13, 12, 11, 10, 9, 8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    sm.reset_tap();
    sm.set_ir(4'h1);
    // input PE 0 -> bus 0 -> level-2 bus 3
    sm.wr(0, 0, ins(OP_PASS, 0, 7, 7, 0, 0, 1, 0, 0));
    sm.wr(48, 0, pcfg(SEL_NONE, SEL_NONE, 0));
    sm.wr(48, 4, 40'({L2_DRIVE, 4'd3}));
    sm.wr(50, 4, 40'({L2_RECV, 4'd3}));
    sm.wr(51, 4, 40'({L2_RECV, 4'd3}));
    // taps
    for (int k = 0; k < 7; k++) begin
      int pe, cl, idx, dq0, outb;
      pe = pe_of_tap[k]; cl = pe / 4; idx = pe % 4;
      sm.wr(pe, 0, ins(OP_BOOTH, 7, 3, 4, 5, 1, 0, 1, 0));      // r5 = step0(x peek)
      sm.wr(pe, 1, ins(OP_BOOTH, 5, 3, 4, 5, 1, 0, 2, 1));
      sm.wr(pe, 2, ins(OP_BOOTH, 5, 3, 4, 5, 1, 0, 3, 2));
      sm.wr(pe, 3, ins(OP_BOOTH, 5, 2, 4, 5, 1, 0, 4, 3));      // last step pops x
      if (k == 6) sm.wr(pe, 4, ins(OP_ADD, 5, 7, 7, 0, 0, 1, 0, 0));
      else        sm.wr(pe, 4, ins(OP_ADD, 5, 0, 7, 0, 0, 1, 0, 0));  // + s(k+1)
      sm.wr(pe, 12, 40'(C[k]));                                  // r4 = ck
      if (k != 6) begin
        sm.wr(pe, 8, 40'd0);                                     // s(k+1)[-1] = 0
        sm.wr(pe, 14, 40'h042);                                  // DQ0 queue with 1 word, DQ2 registers
      end else
        sm.wr(pe, 14, 40'h040);
      dq0  = (k == 6) ? SEL_NONE : (k == 2) ? 1 : SEL_NEIGH;
      outb = (k == 3) ? 1 : (k == 0) ? 2 : OUT_NONE;
      sm.wr(48 + cl, idx, pcfg(dq0, 0, outb));
    end
    sm.wr(50, 5, 40'({L2_DRIVE, 4'd7}));   // cluster 2 bus 1: tap 3 -> level-2 bus 7
    sm.wr(51, 5, 40'({L2_RECV, 4'd7}));    // cluster 3 bus 1 -> tap 2
    sm.wr(51, 6, 40'({L2_DRIVE, 4'd9}));   // cluster 3 bus 2: y -> level-2 bus 9
    sm.wr(53, 4, 40'({L2_RECV, 4'd9}));    // cluster 5 bus 0 -> PE 20
    sm.wr(53, 0, pcfg(0, SEL_NONE, OUT_EXT));
    sm.wr(20, 0, ins(OP_PASS, 0, 7, 7, 0, 0, 1, 0, 0));
    sm.set_ir(4'h2);
    io_out_ready[3] = 1'b1;
    fork
      begin
        for (int n = 0; n < NS; n++) begin
          io_in_valid[0] = 1'b1;
          io_in_data[0]  = (n < 3) ? 16'(16'sd20000 * (n == 0 ? 1 : -1)) : 16'($urandom);
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
    chk(last_out - first_out == 5 * (NS - 1),
        $sformatf("sample period: %0d cycles for %0d samples, exp 5 each", last_out - first_out, NS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
