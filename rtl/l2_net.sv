// l2_net: level-2 network joining the 12 clusters, for one kind of stream.
//
// Sixteen long buses run across the chip between the upper and lower rows of
// six clusters. At each of the six cluster positions a switch matrix (16 x 6
// in the source) lets a level-1 bus of the cluster above or below drive a
// level-2 bus or receive from it; here each level-1 bus has one such
// connection, chosen by its l2_mode/l2_sel in the cluster. Break switches cut
// a long bus into shorter independent segments so that local traffic does not
// use up a whole bus: brk[i][k] = 1 opens level-2 bus i at break point k.
// The source shows break switches after every second cluster position; this
// design places them between positions 1|2 and 3|4, so each bus can be split
// into up to three segments (up to 48 independent level-2 buses).
//
// Each segment is one net: its value is the wired AND of its drivers (all
// ones when undriven, as on a precharged bus), and its handshake is high only
// when a driver has a value and every level-1 bus attached to it, driver or
// receiver, has all its local receivers ready. That handshake is returned to
// every attached level-1 bus, so a broadcast completes everywhere in the same
// cycle. Combinational; a transfer through both network levels takes the one
// clock edge at which the handshake is high, as in the source.
module l2_net
  import paddi_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NPOS  = 6,   // cluster positions along the buses
  parameter int unsigned NBRK  = 2    // break points per bus
) (
  input  l2mode_e [NCL-1:0][NL1-1:0]             bus_l2_mode,
  input  logic    [NCL-1:0][NL1-1:0][3:0]        bus_l2_sel,
  input  logic    [NCL-1:0][NL1-1:0]             bus_drv_valid,
  input  logic    [NCL-1:0][NL1-1:0][WIDTH-1:0]  bus_drv_data,
  input  logic    [NCL-1:0][NL1-1:0]             bus_local_rdy,
  input  logic    [NL2-1:0][NBRK-1:0]            brk,
  output logic    [NCL-1:0][NL1-1:0][WIDTH-1:0]  l2_data,
  output logic    [NCL-1:0][NL1-1:0]             l2_hs
);
  localparam int unsigned NSEG = NBRK + 1;

  // segment of bus i seen at cluster position pos
  function automatic int unsigned seg_of(input logic [NBRK-1:0] b, input int unsigned pos);
    int unsigned s;
    s = 0;
    for (int unsigned k = 0; k < NBRK; k++)
      if (pos >= (k + 1) * NPOS / NSEG && b[k]) s++;
    return s;
  endfunction

  logic [NL2-1:0][NSEG-1:0][WIDTH-1:0] seg_data;
  logic [NL2-1:0][NSEG-1:0]            seg_valid, seg_rdy, seg_hs;

  always_comb begin
    for (int i = 0; i < int'(NL2); i++) begin
      for (int s = 0; s < int'(NSEG); s++) begin
        seg_data[i][s]  = '1;
        seg_valid[i][s] = 1'b0;
        seg_rdy[i][s]   = 1'b1;
      end
      for (int c = 0; c < int'(NCL); c++) begin
        for (int b = 0; b < int'(NL1); b++) begin
          if (bus_l2_sel[c][b] == 4'(i) && bus_l2_mode[c][b] != L2_NONE) begin
            automatic int unsigned s = seg_of(brk[i], c % NPOS);
            seg_rdy[i][s] = seg_rdy[i][s] & bus_local_rdy[c][b];
            if (bus_l2_mode[c][b] == L2_DRIVE) begin
              seg_data[i][s]  = seg_data[i][s] & bus_drv_data[c][b];
              seg_valid[i][s] = seg_valid[i][s] | bus_drv_valid[c][b];
            end
          end
        end
      end
      for (int s = 0; s < int'(NSEG); s++) seg_hs[i][s] = seg_valid[i][s] & seg_rdy[i][s];
    end
  end

  always_comb begin
    for (int c = 0; c < int'(NCL); c++) begin
      for (int b = 0; b < int'(NL1); b++) begin
        automatic int unsigned s = seg_of(brk[bus_l2_sel[c][b]], c % NPOS);
        l2_data[c][b] = seg_data[bus_l2_sel[c][b]][s];
        l2_hs[c][b]   = seg_hs[bus_l2_sel[c][b]][s] && bus_l2_mode[c][b] != L2_NONE;
      end
    end
  end
endmodule
