// l1_net: level-1 network of one 4-PE cluster, for one kind of stream.
//
// A cluster has six buses (six 16-bit data buses in the source; the control
// streams use the same structure at WIDTH = 1, the control bus count being
// this design's choice). Each PE output is switched onto at most one bus
// (out_bus), and each PE input port listens to one bus or to the output of
// the PE just above it in the cluster (port_sel = SEL_NEIGH; PE 0 listens to
// PE 3), which gives neighbouring PEs a path that bypasses the buses.
//
// Every bus carries a handshake that is the wired-AND of all parties on it:
// the transfer completes only if the sender has a value and every receiver
// has room, so one sender can broadcast to any number of receivers and all of
// them take the word in the same cycle. An undriven bus reads all ones, as a
// precharged bus would; several drivers on one bus combine as a wired AND.
// A bus may also be attached to the level-2 network (bus_l2_mode): it then
// either drives a level-2 bus or receives from one, and its handshake is the
// one the level-2 network computes over the whole joined net.
//
// Combinational; every transfer takes the one clock edge at which the
// handshake is high. Readiness is computed from receiver state only, so there
// is no path from a handshake back into readiness.
module l1_net
  import paddi_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NP    = 3   // input ports per PE on this network
) (
  input  logic [NPE_CL-1:0]                 pe_valid,
  input  logic [NPE_CL-1:0][WIDTH-1:0]      pe_data,
  input  logic [NPE_CL-1:0][2:0]            out_bus,
  output logic [NPE_CL-1:0]                 pe_accept,
  input  logic [NPE_CL-1:0][NP-1:0][2:0]    port_sel,
  input  logic [NPE_CL-1:0][NP-1:0]         port_ready,
  output logic [NPE_CL-1:0][NP-1:0]         port_push,
  output logic [NPE_CL-1:0][NP-1:0][WIDTH-1:0] port_data,
  // level-2 attachment of each bus
  input  l2mode_e [NL1-1:0]                 bus_l2_mode,
  output logic [NL1-1:0]                    bus_drv_valid,  // local sender has a value
  output logic [NL1-1:0][WIDTH-1:0]         bus_drv_data,   // local value on the bus
  output logic [NL1-1:0]                    bus_local_rdy,  // all local receivers ready
  input  logic [NL1-1:0][WIDTH-1:0]         l2_data,        // value of the joined net
  input  logic [NL1-1:0]                    l2_hs           // handshake of the joined net
);
  logic [NPE_CL-1:0]             nb_rdy;    // neighbour receivers of PE k ready
  logic [NPE_CL-1:0]             nb_used;   // PE k has a neighbour receiver
  logic [NL1-1:0]                hs;
  logic [NL1-1:0][WIDTH-1:0]     bus_data;

  always_comb begin
    // neighbour listeners: PE (k+1) mod 4 ports with SEL_NEIGH listen to PE k
    for (int k = 0; k < int'(NPE_CL); k++) begin
      nb_rdy[k]  = 1'b1;
      nb_used[k] = 1'b0;
      for (int p = 0; p < int'(NP); p++) begin
        if (port_sel[(k+1) % NPE_CL][p] == SEL_NEIGH) begin
          nb_used[k] = 1'b1;
          nb_rdy[k]  = nb_rdy[k] & port_ready[(k+1) % NPE_CL][p];
        end
      end
    end

    // local side of each bus
    for (int b = 0; b < int'(NL1); b++) begin
      bus_drv_data[b]  = '1;
      bus_drv_valid[b] = 1'b0;
      bus_local_rdy[b] = 1'b1;
      for (int k = 0; k < int'(NPE_CL); k++) begin
        if (out_bus[k] == 3'(b)) begin
          bus_drv_data[b]  = bus_drv_data[b] & pe_data[k];
          bus_drv_valid[b] = bus_drv_valid[b] | pe_valid[k];
          bus_local_rdy[b] = bus_local_rdy[b] & nb_rdy[k];
        end
        for (int p = 0; p < int'(NP); p++)
          if (port_sel[k][p] == 3'(b)) bus_local_rdy[b] = bus_local_rdy[b] & port_ready[k][p];
      end
    end
  end

  // bus value and handshake, after the level-2 network has joined the nets
  always_comb begin
    for (int b = 0; b < int'(NL1); b++) begin
      if (bus_l2_mode[b] == L2_NONE) begin
        bus_data[b] = bus_drv_data[b];
        hs[b]       = bus_drv_valid[b] & bus_local_rdy[b];
      end else begin
        bus_data[b] = l2_data[b];
        hs[b]       = l2_hs[b];
      end
    end

  end

  always_comb begin
    // senders
    for (int k = 0; k < int'(NPE_CL); k++) begin
      if (out_bus[k] < 3'(NL1)) pe_accept[k] = hs[out_bus[k]];
      else if (out_bus[k] == OUT_NONE && nb_used[k]) pe_accept[k] = pe_valid[k] & nb_rdy[k];
      else pe_accept[k] = 1'b0;
    end

  end

  always_comb begin
    // receivers
    for (int k = 0; k < int'(NPE_CL); k++) begin
      for (int p = 0; p < int'(NP); p++) begin
        port_push[k][p] = 1'b0;
        port_data[k][p] = '1;
        if (port_sel[k][p] < 3'(NL1)) begin
          port_push[k][p] = hs[port_sel[k][p]];
          port_data[k][p] = bus_data[port_sel[k][p]];
        end else if (port_sel[k][p] == SEL_NEIGH) begin
          port_push[k][p] = pe_accept[(k+NPE_CL-1) % NPE_CL];
          port_data[k][p] = pe_data[(k+NPE_CL-1) % NPE_CL];
        end
      end
    end
  end
endmodule
