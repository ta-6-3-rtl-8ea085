// tb_l1_net: self-checking test of the level-1 cluster network.
//
// Broadcast from one PE to three receivers with random readiness: the word
// must reach all of them in the same cycle, or none, and the sender is
// released only then. Also: the neighbour path, an undriven bus reading all
// ones, a bus receiving from level 2, and the values exported to level 2 by a
// driving bus.
module tb_l1_net;
  import paddi_pkg::*;

  logic [3:0]             pe_valid, pe_accept;
  logic [3:0][15:0]       pe_data;
  logic [3:0][2:0]        out_bus;
  logic [3:0][2:0][2:0]   port_sel;
  logic [3:0][2:0]        port_ready, port_push;
  logic [3:0][2:0][15:0]  port_data;
  l2mode_e [5:0]          bus_l2_mode;
  logic [5:0]             bus_drv_valid, bus_local_rdy, l2_hs;
  logic [5:0][15:0]       bus_drv_data, l2_data;
  int checks = 0, failures = 0;

  l1_net #(.WIDTH(16), .NP(3)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    for (int k = 0; k < 4; k++) begin
      out_bus[k] = OUT_NONE;
      for (int p = 0; p < 3; p++) port_sel[k][p] = SEL_NONE;
    end
    bus_l2_mode = {6{L2_NONE}};
    l2_hs = '0; l2_data = '0;
  endtask

  initial begin
    idle();
    pe_valid = '0; pe_data = '0; port_ready = '0;
    // broadcast PE0 -> bus 2 -> PE1.p0, PE2.p1, PE3.p2
    out_bus[0] = 3'd2; port_sel[1][0] = 3'd2; port_sel[2][1] = 3'd2; port_sel[3][2] = 3'd2;
    for (int n = 0; n < 200; n++) begin
      logic all_rdy;
      pe_valid   = 4'($urandom);
      pe_data    = 64'({$urandom, $urandom});
      port_ready = 12'($urandom);
      all_rdy    = port_ready[1][0] & port_ready[2][1] & port_ready[3][2];
      #1;
      chk(pe_accept[0] == (pe_valid[0] & all_rdy), "sender accept");
      chk(port_push[1][0] == (pe_valid[0] & all_rdy) && port_push[2][1] == port_push[1][0]
          && port_push[3][2] == port_push[1][0], "all receivers together");
      chk(port_data[2][1] == pe_data[0], "broadcast data");
      chk(port_push[1][1] == 0 && port_push[2][0] == 0, "unselected ports idle");
      chk(pe_accept[1] == 0, "PE without bus is not released");
    end
    // undriven bus reads as precharged ones
    idle(); port_sel[2][0] = 3'd4; pe_valid = '1; port_ready = '1; #1;
    chk(port_data[2][0] == 16'hFFFF && !port_push[2][0], "undriven bus");
    // neighbour path: PE1 port 0 takes PE0's output directly
    idle(); port_sel[1][0] = SEL_NEIGH;
    for (int n = 0; n < 50; n++) begin
      pe_valid = 4'($urandom); port_ready = 12'($urandom); pe_data[0] = 16'($urandom); #1;
      chk(port_push[1][0] == (pe_valid[0] & port_ready[1][0]) && pe_accept[0] == port_push[1][0]
          && port_data[1][0] == pe_data[0], "neighbour");
    end
    // wrap-around neighbour: PE0 listens to PE3
    idle(); port_sel[0][2] = SEL_NEIGH; pe_valid = 4'b1000; port_ready = '1; pe_data[3] = 16'h3333; #1;
    chk(port_push[0][2] && port_data[0][2] == 16'h3333 && pe_accept[3], "neighbour wrap");
    // bus 3 receives from level 2
    idle(); bus_l2_mode[3] = L2_RECV; port_sel[2][2] = 3'd3; port_sel[0][0] = 3'd3;
    port_ready = '1; l2_data[3] = 16'hCAFE; l2_hs[3] = 1'b1; #1;
    chk(port_push[2][2] && port_push[0][0] && port_data[2][2] == 16'hCAFE, "level-2 receive");
    chk(bus_local_rdy[3] == 1'b1, "receive exports local ready");
    port_ready[0][0] = 1'b0; #1;
    chk(bus_local_rdy[3] == 1'b0, "local ready falls with a receiver");
    l2_hs[3] = 1'b0; #1;
    chk(!port_push[2][2], "no level-2 handshake, no push");
    // bus 5 drives level 2
    idle(); bus_l2_mode[5] = L2_DRIVE; out_bus[1] = 3'd5; pe_valid = 4'b0010; pe_data[1] = 16'h1357;
    port_ready = '1; #1;
    chk(bus_drv_valid[5] && bus_drv_data[5] == 16'h1357 && bus_local_rdy[5], "drive export");
    chk(!pe_accept[1], "driver waits for level-2 handshake");
    l2_hs[5] = 1'b1; #1;
    chk(pe_accept[1], "driver released by level-2 handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
