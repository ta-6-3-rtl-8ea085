// tb_l2_net: self-checking test of the level-2 network.
//
// One level-1 bus drives level-2 bus 7 and several others, at different
// cluster positions and rows, receive from it. With the break switches closed
// the net spans the chip and the handshake needs every attached bus ready; with
// a break switch open the bus splits into segments that carry independent
// transfers at the same time. Also checks the wired AND of two drivers and an
// undriven segment.
module tb_l2_net;
  import paddi_pkg::*;

  l2mode_e [11:0][5:0]        bus_l2_mode;
  logic    [11:0][5:0][3:0]   bus_l2_sel;
  logic    [11:0][5:0]        bus_drv_valid, bus_local_rdy, l2_hs;
  logic    [11:0][5:0][15:0]  bus_drv_data, l2_data;
  logic    [15:0][1:0]        brk;
  int checks = 0, failures = 0;

  l2_net #(.WIDTH(16)) dut (.*);

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

  task automatic clear();
    for (int c = 0; c < 12; c++)
      for (int b = 0; b < 6; b++) begin
        bus_l2_mode[c][b] = L2_NONE; bus_l2_sel[c][b] = 4'd0;
      end
    bus_drv_valid = '0; bus_drv_data = '0; bus_local_rdy = '1; brk = '0;
  endtask

  initial begin
    clear();
    // driver: cluster 0 (position 0) bus 1; receivers: cluster 3 (pos 3) bus 0,
    // cluster 11 (pos 5, lower row) bus 4, cluster 6 (pos 0, lower row) bus 2
    bus_l2_mode[0][1] = L2_DRIVE; bus_l2_sel[0][1] = 4'd7;
    bus_l2_mode[3][0] = L2_RECV;  bus_l2_sel[3][0] = 4'd7;
    bus_l2_mode[11][4] = L2_RECV; bus_l2_sel[11][4] = 4'd7;
    bus_l2_mode[6][2] = L2_RECV;  bus_l2_sel[6][2] = 4'd7;
    for (int n = 0; n < 200; n++) begin
      logic exp_hs;
      bus_drv_valid[0][1] = 1'($urandom);
      bus_drv_data[0][1]  = 16'($urandom);
      bus_local_rdy       = {$urandom, $urandom, $urandom};
      exp_hs = bus_drv_valid[0][1] & bus_local_rdy[0][1] & bus_local_rdy[3][0]
             & bus_local_rdy[11][4] & bus_local_rdy[6][2];
      #1;
      chk(l2_hs[0][1] == exp_hs && l2_hs[3][0] == exp_hs && l2_hs[11][4] == exp_hs
          && l2_hs[6][2] == exp_hs, "joined handshake");
      chk(l2_data[11][4] == bus_drv_data[0][1] && l2_data[3][0] == bus_drv_data[0][1], "data");
      chk(l2_hs[1][0] == 0, "unattached bus idle");
    end
    // open break point 0 (between positions 1 and 2) on bus 7: cluster 3 and 11
    // are cut off from the driver; give them their own driver, cluster 9 (pos 3)
    brk[7][0] = 1'b1;
    bus_l2_mode[9][5] = L2_DRIVE; bus_l2_sel[9][5] = 4'd7;
    bus_local_rdy = '1;
    bus_drv_valid[0][1] = 1'b1; bus_drv_data[0][1] = 16'hAAAA;
    bus_drv_valid[9][5] = 1'b1; bus_drv_data[9][5] = 16'h5555;
    #1;
    chk(l2_data[6][2] == 16'hAAAA && l2_hs[6][2], "left segment");
    chk(l2_data[3][0] == 16'h5555 && l2_data[11][4] == 16'h5555 && l2_hs[11][4], "right segment");
    bus_local_rdy[11][4] = 1'b0; #1;
    chk(l2_hs[6][2] && !l2_hs[3][0], "segments independent");
    // close the switch: two drivers on one net combine as a wired AND
    brk[7][0] = 1'b0; bus_local_rdy = '1; #1;
    chk(l2_data[3][0] == 16'h0000, "wired AND of two drivers");
    // undriven segment: all ones, no handshake
    clear();
    bus_l2_mode[2][3] = L2_RECV; bus_l2_sel[2][3] = 4'd15; #1;
    chk(l2_data[2][3] == 16'hFFFF && !l2_hs[2][3], "undriven");
    // both break points open: three segments on bus 15
    clear(); brk[15] = 2'b11;
    bus_l2_mode[0][0] = L2_DRIVE; bus_l2_sel[0][0] = 4'd15; bus_drv_valid[0][0] = 1; bus_drv_data[0][0] = 16'h0001;
    bus_l2_mode[2][0] = L2_DRIVE; bus_l2_sel[2][0] = 4'd15; bus_drv_valid[2][0] = 1; bus_drv_data[2][0] = 16'h0002;
    bus_l2_mode[4][0] = L2_DRIVE; bus_l2_sel[4][0] = 4'd15; bus_drv_valid[4][0] = 1; bus_drv_data[4][0] = 16'h0004;
    bus_l2_mode[7][1] = L2_RECV;  bus_l2_sel[7][1] = 4'd15;   // pos 1
    bus_l2_mode[9][1] = L2_RECV;  bus_l2_sel[9][1] = 4'd15;   // pos 3
    bus_l2_mode[11][1] = L2_RECV; bus_l2_sel[11][1] = 4'd15;  // pos 5
    #1;
    chk(l2_data[7][1] == 16'h0001 && l2_data[9][1] == 16'h0002 && l2_data[11][1] == 16'h0004
        && l2_hs[7][1] && l2_hs[9][1] && l2_hs[11][1], "three segments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
