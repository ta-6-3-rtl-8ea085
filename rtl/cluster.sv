// cluster: four PEs and their level-1 networks.
//
// The cluster is the unit of the array's first network level: four PEs
// stacked in a column with six data buses running over them (in the source the
// buses are routed as feed-throughs across the PE datapaths) plus a matching
// set of 1-bit control buses, here six as well (this design's choice). The
// switch settings are configuration registers of the cluster:
//   local 0-3   pecfg_t of PE k: bus or neighbour feeding DQ0-2 and CQ0-1,
//               and the buses its data and control outputs drive
//   local 4-9   data bus b: {l2_mode[1:0], l2_sel[3:0]} attachment to level 2
//   local 10-15 control bus b: the same for the control buses
// After reset every input is unconnected and every output drives nothing.
//
// When IO_PE is set, PE 0 also serves as an I/O processor: its DQ0 can take
// words from the chip pins (dq0_sel = SEL_NONE selects the pins) and its data
// output can drive the pins (out_bus = OUT_EXT), each with a valid/ready
// handshake. Eight PEs of the chip are I/O processors, as in the source; which
// port of the PE the pins use is this design's choice.
//
// Configuration: word writes on cfg_*, addressed {unit, local}; PE k answers
// to unit 4*CL_ID + k and the cluster's own registers to unit 48 + CL_ID.
// cfg_rdata returns the addressed word when cfg_hit is high.
module cluster
  import paddi_pkg::*;
#(
  parameter int unsigned CL_ID = 0,
  parameter bit          IO_PE = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  // configuration
  input  logic                         cfg_we,
  input  logic [CFG_AW-1:0]            cfg_addr,
  input  logic [CFG_DW-1:0]            cfg_wdata,
  output logic [CFG_DW-1:0]            cfg_rdata,
  output logic                         cfg_hit,
  // level-2 attachment, data buses
  output l2mode_e [NL1-1:0]            d_l2_mode,
  output logic [NL1-1:0][3:0]          d_l2_sel,
  output logic [NL1-1:0]               d_drv_valid,
  output logic [NL1-1:0][15:0]         d_drv_data,
  output logic [NL1-1:0]               d_local_rdy,
  input  logic [NL1-1:0][15:0]         d_l2_data,
  input  logic [NL1-1:0]               d_l2_hs,
  // level-2 attachment, control buses
  output l2mode_e [NL1-1:0]            c_l2_mode,
  output logic [NL1-1:0][3:0]          c_l2_sel,
  output logic [NL1-1:0]               c_drv_valid,
  output logic [NL1-1:0]               c_drv_data,
  output logic [NL1-1:0]               c_local_rdy,
  input  logic [NL1-1:0]               c_l2_data,
  input  logic [NL1-1:0]               c_l2_hs,
  // I/O port (used when IO_PE)
  input  logic                         ext_in_valid,
  input  logic [15:0]                  ext_in_data,
  output logic                         ext_in_ready,
  output logic                         ext_out_valid,
  output logic [15:0]                  ext_out_data,
  input  logic                         ext_out_ready,
  // activity
  output logic [NPE_CL-1:0]            pe_fire,
  output logic [NPE_CL-1:0]            pe_stall
);
  localparam logic [5:0] MY_UNIT = UNIT_CL0 + 6'(CL_ID);

  pecfg_t   pecfg [NPE_CL];
  logic [5:0] dbus_cfg [NL1];
  logic [5:0] cbus_cfg [NL1];

  logic [5:0] unit;
  logic [5:0] lcl;
  assign unit = cfg_addr[11:6];
  assign lcl  = cfg_addr[5:0];

  // ---------------- configuration registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NPE_CL); k++)
        pecfg[k] <= '{cout_bus: OUT_NONE, out_bus: OUT_NONE, cq1_sel: SEL_NONE,
                      cq0_sel: SEL_NONE, dq2_sel: SEL_NONE, dq1_sel: SEL_NONE,
                      dq0_sel: SEL_NONE};
      for (int b = 0; b < int'(NL1); b++) begin
        dbus_cfg[b] <= '0;
        cbus_cfg[b] <= '0;
      end
    end else if (cfg_we && unit == MY_UNIT) begin
      if (lcl < 6'd4)        pecfg[lcl[1:0]]    <= pecfg_t'(cfg_wdata[20:0]);
      else if (lcl < 6'd10)  dbus_cfg[3'(lcl - 6'd4)]  <= cfg_wdata[5:0];
      else if (lcl < 6'd16)  cbus_cfg[3'(lcl - 6'd10)] <= cfg_wdata[5:0];
    end
  end

  for (genvar b = 0; b < NL1; b++) begin : g_buscfg
    assign d_l2_mode[b] = l2mode_e'(dbus_cfg[b][5:4]);
    assign d_l2_sel[b]  = dbus_cfg[b][3:0];
    assign c_l2_mode[b] = l2mode_e'(cbus_cfg[b][5:4]);
    assign c_l2_sel[b]  = cbus_cfg[b][3:0];
  end

  // ---------------- PEs ----------------
  logic [NPE_CL-1:0]             pe_out_valid, pe_out_accept, pe_cout_valid, pe_cout_accept;
  logic [NPE_CL-1:0][15:0]       pe_out_data;
  logic [NPE_CL-1:0]             pe_cout_data;
  logic [NPE_CL-1:0][2:0]        pe_in_ready, pe_in_push;
  logic [NPE_CL-1:0][2:0][15:0]  pe_in_data;
  logic [NPE_CL-1:0][1:0]        pe_cin_ready, pe_cin_push, pe_cin_data;
  logic [NPE_CL-1:0][CFG_DW-1:0] pe_rdata;

  // network-side views
  logic [NPE_CL-1:0][2:0]        d_out_bus, c_out_bus;
  logic [NPE_CL-1:0][2:0][2:0]   d_port_sel;
  logic [NPE_CL-1:0][1:0][2:0]   c_port_sel;
  logic [NPE_CL-1:0]             d_accept, c_accept;
  logic [NPE_CL-1:0][2:0]        d_push;
  logic [NPE_CL-1:0][2:0][15:0]  d_pdata;
  logic [NPE_CL-1:0][1:0]        c_push;
  logic [NPE_CL-1:0][1:0][0:0]   c_pdata;
  logic                          io_in_sel, io_out_sel;

  assign io_in_sel  = IO_PE && pecfg[0].dq0_sel == SEL_NONE;
  assign io_out_sel = IO_PE && pecfg[0].out_bus == OUT_EXT;

  for (genvar k = 0; k < NPE_CL; k++) begin : g_pe
    pe u_pe (
      .clk, .rst_n, .run,
      .cfg_we(cfg_we && unit == 6'(4*CL_ID + k)), .cfg_local(lcl), .cfg_wdata,
      .cfg_rdata(pe_rdata[k]),
      .in_push(pe_in_push[k]), .in_data(pe_in_data[k]), .in_ready(pe_in_ready[k]),
      .cin_push(pe_cin_push[k]), .cin_data(pe_cin_data[k]), .cin_ready(pe_cin_ready[k]),
      .out_valid(pe_out_valid[k]), .out_data(pe_out_data[k]), .out_accept(pe_out_accept[k]),
      .cout_valid(pe_cout_valid[k]), .cout_data(pe_cout_data[k]), .cout_accept(pe_cout_accept[k]),
      .fire(pe_fire[k]), .stall(pe_stall[k])
    );
    assign d_out_bus[k]     = pecfg[k].out_bus;
    assign c_out_bus[k]     = pecfg[k].cout_bus;
    assign d_port_sel[k][0] = pecfg[k].dq0_sel;
    assign d_port_sel[k][1] = pecfg[k].dq1_sel;
    assign d_port_sel[k][2] = pecfg[k].dq2_sel;
    assign c_port_sel[k][0] = pecfg[k].cq0_sel;
    assign c_port_sel[k][1] = pecfg[k].cq1_sel;
    for (genvar p = 0; p < 2; p++) begin : g_c
      assign pe_cin_push[k][p] = c_push[k][p];
      assign pe_cin_data[k][p] = c_pdata[k][p][0];
    end
    assign pe_cout_accept[k] = c_accept[k];
    if (k == 0) begin : g_io
      assign pe_in_push[k][0]  = io_in_sel ? (ext_in_valid && pe_in_ready[k][0]) : d_push[k][0];
      assign pe_in_data[k][0]  = io_in_sel ? ext_in_data : d_pdata[k][0];
      assign pe_in_push[k][2:1] = d_push[k][2:1];
      assign pe_in_data[k][2:1] = d_pdata[k][2:1];
      assign pe_out_accept[k]  = io_out_sel ? (pe_out_valid[k] && ext_out_ready) : d_accept[k];
    end else begin : g_noio
      assign pe_in_push[k]    = d_push[k];
      assign pe_in_data[k]    = d_pdata[k];
      assign pe_out_accept[k] = d_accept[k];
    end
  end

  assign ext_in_ready  = io_in_sel && pe_in_ready[0][0];
  assign ext_out_valid = io_out_sel && pe_out_valid[0];
  assign ext_out_data  = pe_out_data[0];

  // ---------------- level-1 networks ----------------
  l1_net #(.WIDTH(16), .NP(3)) u_dnet (
    .pe_valid(pe_out_valid), .pe_data(pe_out_data), .out_bus(d_out_bus), .pe_accept(d_accept),
    .port_sel(d_port_sel), .port_ready(pe_in_ready), .port_push(d_push), .port_data(d_pdata),
    .bus_l2_mode(d_l2_mode), .bus_drv_valid(d_drv_valid), .bus_drv_data(d_drv_data),
    .bus_local_rdy(d_local_rdy), .l2_data(d_l2_data), .l2_hs(d_l2_hs)
  );

  logic [NPE_CL-1:0][0:0] c_pe_data;
  logic [NL1-1:0][0:0]    c_drv_data_w, c_l2_data_w;
  for (genvar k = 0; k < NPE_CL; k++) begin : g_cd
    assign c_pe_data[k] = pe_cout_data[k];
  end
  for (genvar b = 0; b < NL1; b++) begin : g_cb
    assign c_drv_data[b]     = c_drv_data_w[b][0];
    assign c_l2_data_w[b][0] = c_l2_data[b];
  end

  l1_net #(.WIDTH(1), .NP(2)) u_cnet (
    .pe_valid(pe_cout_valid), .pe_data(c_pe_data), .out_bus(c_out_bus), .pe_accept(c_accept),
    .port_sel(c_port_sel), .port_ready(pe_cin_ready), .port_push(c_push), .port_data(c_pdata),
    .bus_l2_mode(c_l2_mode), .bus_drv_valid(c_drv_valid), .bus_drv_data(c_drv_data_w),
    .bus_local_rdy(c_local_rdy), .l2_data(c_l2_data_w), .l2_hs(c_l2_hs)
  );

  // ---------------- configuration read ----------------
  always_comb begin
    cfg_hit   = 1'b0;
    cfg_rdata = '0;
    for (int k = 0; k < int'(NPE_CL); k++)
      if (unit == 6'(4*CL_ID + k)) begin
        cfg_hit   = 1'b1;
        cfg_rdata = pe_rdata[k];
      end
    if (unit == MY_UNIT) begin
      cfg_hit = 1'b1;
      if (lcl < 6'd4)       cfg_rdata[20:0] = pecfg[lcl[1:0]];
      else if (lcl < 6'd10) cfg_rdata[5:0]  = dbus_cfg[3'(lcl - 6'd4)];
      else if (lcl < 6'd16) cfg_rdata[5:0]  = cbus_cfg[3'(lcl - 6'd10)];
    end
  end
endmodule
