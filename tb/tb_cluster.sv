// tb_cluster: self-checking test of one 4-PE cluster with its I/O port.
//
// A small data-flow graph mapped onto the four PEs:
//   PE0 (I/O processor): a = x + 3, x from the pins, a broadcast on bus 0
//   PE1: b = a << 1, on bus 1
//   PE2: c = a - 1, sent to PE3 over the neighbour path
//   PE3: y = b + c, on bus 2, which drives the level-2 network
// The testbench plays the level-2 network with a single receiver of random
// readiness and checks y = 3*(x + 3) for every input in order. With the sink
// always ready it checks the rate: one result per clock after the pipeline
// fills. Configuration registers are read back as well.
module tb_cluster;
  import paddi_pkg::*;

  logic clk = 0, rst_n = 0, run = 0;
  logic cfg_we = 0;
  logic [11:0] cfg_addr = 0;
  logic [39:0] cfg_wdata = 0, cfg_rdata;
  logic cfg_hit;
  l2mode_e [5:0] d_l2_mode, c_l2_mode;
  logic [5:0][3:0] d_l2_sel, c_l2_sel;
  logic [5:0] d_drv_valid, d_local_rdy, d_l2_hs, c_drv_valid, c_drv_data, c_local_rdy, c_l2_data, c_l2_hs;
  logic [5:0][15:0] d_drv_data, d_l2_data;
  logic ext_in_valid = 0, ext_in_ready, ext_out_valid, ext_out_ready = 0;
  logic [15:0] ext_in_data = 0, ext_out_data;
  logic [3:0] pe_fire, pe_stall;
  logic sink_ready = 1;
  int checks = 0, failures = 0;

  cluster #(.CL_ID(0), .IO_PE(1'b1)) dut (.*);
  always #5 clk = ~clk;

  // level-2 stand-in: one receiver on each attached bus
  always_comb begin
    for (int b = 0; b < 6; b++) begin
      d_l2_data[b] = d_drv_data[b];
      d_l2_hs[b]   = d_l2_mode[b] == L2_DRIVE && d_drv_valid[b] && d_local_rdy[b] && sink_ready;
      c_l2_data[b] = 1'b1;
      c_l2_hs[b]   = 1'b0;
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] mk(alu_op_e op, int sa, int sb, int imm);
    instr_t i;
    i = '0;
    i.op = op; i.sa = 3'(sa); i.sb = 3'(sb); i.sc = SRC_ZERO; i.oen = 1'b1;
    i.bcond = BR_ALWAYS; i.imm = 10'(imm);
    return i;
  endfunction

  function automatic logic [39:0] pc_(int dq0, int dq1, int outb);
    pecfg_t p;
    p = '{cout_bus: OUT_NONE, out_bus: 3'(outb), cq1_sel: SEL_NONE, cq0_sel: SEL_NONE,
          dq2_sel: SEL_NONE, dq1_sel: 3'(dq1), dq0_sel: 3'(dq0)};
    return 40'(p);
  endfunction

  task automatic cfg(input int unit, input int lcl, input logic [39:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = {6'(unit), 6'(lcl)}; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [15:0] xs[$], exp_q[$];
  int outs = 0;

  // scoreboard on bus 2 (level-2 drive)
  always @(posedge clk) begin
    if (d_l2_hs[2]) begin
      chk(exp_q.size() > 0 && d_drv_data[2] == exp_q[0], "result value");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      outs++;
    end
    if (ext_in_valid && ext_in_ready) exp_q.push_back(16'(3 * (ext_in_data + 3) - 1));
  end

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg(0, 0, mk(OP_ADD, 0, SRC_IMM, 3));
    cfg(1, 0, mk(OP_SHL, 0, SRC_IMM, 1));
    cfg(2, 0, mk(OP_SUB, 0, SRC_IMM, 1));
    cfg(3, 0, mk(OP_ADD, 0, 2, 0));
    cfg(48, 0, pc_(SEL_NONE, SEL_NONE, 0));
    cfg(48, 1, pc_(0, SEL_NONE, 1));
    cfg(48, 2, pc_(0, SEL_NONE, OUT_NONE));
    cfg(48, 3, pc_(1, SEL_NEIGH, 2));
    cfg(48, 6, {34'd0, L2_DRIVE, 4'd0});
    // read back
    cfg_addr = {6'd48, 6'd3}; #1;
    chk(cfg_hit && cfg_rdata == pc_(1, SEL_NEIGH, 2), "cluster config read-back");
    cfg_addr = {6'd3, 6'd0}; #1;
    chk(cfg_hit && cfg_rdata == mk(OP_ADD, 0, 2, 0), "program read-back");
    cfg_addr = {6'd4, 6'd0}; #1;
    chk(!cfg_hit, "other unit not hit");
    run = 1;
    // random traffic with back pressure
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (!ext_in_valid || ext_in_ready) begin
        ext_in_valid = ($urandom_range(0, 3) != 0);
        ext_in_data  = 16'($urandom_range(0, 9000));
      end
      sink_ready = ($urandom_range(0, 3) != 0);
    end
    // drain
    @(negedge clk); ext_in_valid = 0; sink_ready = 1;
    repeat (20) @(negedge clk);
    chk(exp_q.size() == 0, "all results out");
    // rate: 100 words back to back
    outs = 0;
    t0 = 0;
    for (int n = 0; n < 100; n++) begin
      ext_in_valid = 1; ext_in_data = 16'(n);
      @(negedge clk);
      while (!ext_in_ready && t0 < 1000) begin t0++; @(negedge clk); end
    end
    ext_in_valid = 0;
    t1 = 0;
    while (outs < 100 && t1 < 200) begin t1++; @(negedge clk); end
    chk(outs == 100 && t0 == 0, $sformatf("rate: inputs stalled %0d cycles", t0));
    chk(t1 <= 8, $sformatf("pipeline drains in %0d cycles", t1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
