// paddi2_top: 48-PE data-driven reconfigurable multiprocessor for DSP.
//
// Twelve clusters of four 16-bit PEs sit in two rows of six. Within a cluster
// the PEs share six level-1 buses; sixteen level-2 buses with break switches
// join the clusters. All communication is by data and control streams with a
// wired-AND handshake, so a PE executes an instruction only when its operands
// have arrived and its output is free, and a data-flow graph maps onto the
// array node by node. A transfer over either network level takes one clock
// cycle. Eight PEs, the first of clusters 0, 1, 4, 5 (upper row) and 6, 7,
// 10, 11 (lower row), double as I/O processors with a 16-bit input and a
// 16-bit output port on the pins (io_*). At 50 MHz the 48 PEs give 2.4 GOPS
// peak and the eight 16-bit ports 800 MB/s, the figures of the source.
//
// All configuration goes through the 4-pin scan port (tck/tms/tdi/tdo, see
// scan_tap): programs, switch settings, register presets, read-back, run,
// halt and single step. After reset the array is halted with every switch
// open. Configuration address map: see paddi_pkg; unit 60 holds the level-2
// break switches, word 0 for the data buses and word 1 for the control buses,
// bit 2*i+k opening bus i at break point k.
//
// pe_fire/pe_stall report, per PE (index 4*cluster + k), whether the PE
// executed or was blocked in the cycle; they exist for observation.
// Which PEs are I/O processors follows the I/O arrows of the chip's block
// diagram; the port directions and pin handshake are this design's choices.
module paddi2_top
  import paddi_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // scan port
  input  logic                        tck,
  input  logic                        tms,
  input  logic                        tdi,
  output logic                        tdo,
  // I/O processors
  input  logic [NIO-1:0]              io_in_valid,
  input  logic [NIO-1:0][15:0]        io_in_data,
  output logic [NIO-1:0]              io_in_ready,
  output logic [NIO-1:0]              io_out_valid,
  output logic [NIO-1:0][15:0]        io_out_data,
  input  logic [NIO-1:0]              io_out_ready,
  // observation
  output logic                        running,
  output logic [NCL*NPE_CL-1:0]       pe_fire,
  output logic [NCL*NPE_CL-1:0]       pe_stall
);
  // clusters whose PE 0 is an I/O processor, in I/O port order
  localparam int IO_CL [NIO] = '{0, 1, 4, 5, 6, 7, 10, 11};

  function automatic int io_port_of(input int c);
    for (int j = 0; j < int'(NIO); j++) if (IO_CL[j] == c) return j;
    return -1;
  endfunction

  logic              cfg_we, run;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_wdata, cfg_rdata;

  scan_tap u_tap (
    .clk, .rst_n, .tck, .tms, .tdi, .tdo,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .run
  );
  assign running = run;

  // level-2 break switches
  logic [2*NL2-1:0]          brk_d_w, brk_c_w;
  logic [NL2-1:0][1:0]       brk_d, brk_c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brk_d_w <= '0;
      brk_c_w <= '0;
    end else if (cfg_we && cfg_addr[11:6] == UNIT_L2) begin
      if (cfg_addr[5:0] == 6'd0) brk_d_w <= cfg_wdata[2*NL2-1:0];
      if (cfg_addr[5:0] == 6'd1) brk_c_w <= cfg_wdata[2*NL2-1:0];
    end
  end
  assign brk_d = brk_d_w;
  assign brk_c = brk_c_w;

  // cluster <-> level-2 signals
  l2mode_e [NCL-1:0][NL1-1:0]        d_mode, c_mode;
  logic    [NCL-1:0][NL1-1:0][3:0]   d_sel, c_sel;
  logic    [NCL-1:0][NL1-1:0]        d_dv, d_rdy, d_hs, c_dv, c_rdy, c_hs;
  logic    [NCL-1:0][NL1-1:0][15:0]  d_dd, d_l2d;
  logic    [NCL-1:0][NL1-1:0][0:0]   c_dd, c_l2d;
  logic    [NCL-1:0][NL1-1:0]        c_dd_b, c_l2d_b;
  logic    [NCL-1:0][CFG_DW-1:0]     cl_rdata;
  logic    [NCL-1:0]                 cl_hit;

  for (genvar c = 0; c < NCL; c++) begin : g_cl
    localparam int IOP = io_port_of(c);
    localparam int IOJ = (IOP < 0) ? 0 : IOP;
    logic        ein_ready, eout_valid;
    logic [15:0] eout_data;

    cluster #(.CL_ID(c), .IO_PE(IOP >= 0)) u_cl (
      .clk, .rst_n, .run,
      .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata(cl_rdata[c]), .cfg_hit(cl_hit[c]),
      .d_l2_mode(d_mode[c]), .d_l2_sel(d_sel[c]), .d_drv_valid(d_dv[c]), .d_drv_data(d_dd[c]),
      .d_local_rdy(d_rdy[c]), .d_l2_data(d_l2d[c]), .d_l2_hs(d_hs[c]),
      .c_l2_mode(c_mode[c]), .c_l2_sel(c_sel[c]), .c_drv_valid(c_dv[c]), .c_drv_data(c_dd_b[c]),
      .c_local_rdy(c_rdy[c]), .c_l2_data(c_l2d_b[c]), .c_l2_hs(c_hs[c]),
      .ext_in_valid((IOP >= 0) ? io_in_valid[IOJ] : 1'b0),
      .ext_in_data(io_in_data[IOJ]),
      .ext_in_ready(ein_ready),
      .ext_out_valid(eout_valid), .ext_out_data(eout_data),
      .ext_out_ready((IOP >= 0) ? io_out_ready[IOJ] : 1'b0),
      .pe_fire(pe_fire[4*c +: 4]), .pe_stall(pe_stall[4*c +: 4])
    );
    if (IOP >= 0) begin : g_io
      assign io_in_ready[IOP]  = ein_ready;
      assign io_out_valid[IOP] = eout_valid;
      assign io_out_data[IOP]  = eout_data;
    end
    for (genvar b = 0; b < NL1; b++) begin : g_b
      assign c_dd[c][b]    = c_dd_b[c][b];
      assign c_l2d_b[c][b] = c_l2d[c][b][0];
    end
  end

  l2_net #(.WIDTH(16)) u_l2d (
    .bus_l2_mode(d_mode), .bus_l2_sel(d_sel), .bus_drv_valid(d_dv), .bus_drv_data(d_dd),
    .bus_local_rdy(d_rdy), .brk(brk_d), .l2_data(d_l2d), .l2_hs(d_hs)
  );
  l2_net #(.WIDTH(1)) u_l2c (
    .bus_l2_mode(c_mode), .bus_l2_sel(c_sel), .bus_drv_valid(c_dv), .bus_drv_data(c_dd),
    .bus_local_rdy(c_rdy), .brk(brk_c), .l2_data(c_l2d), .l2_hs(c_hs)
  );

  // configuration read-back
  always_comb begin
    cfg_rdata = '0;
    for (int c = 0; c < int'(NCL); c++) if (cl_hit[c]) cfg_rdata = cl_rdata[c];
    if (cfg_addr[11:6] == UNIT_L2)
      cfg_rdata[2*NL2-1:0] = (cfg_addr[5:0] == 6'd0) ? brk_d_w : brk_c_w;
  end
endmodule
