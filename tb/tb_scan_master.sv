// tb_scan_master: scan-port driver used by workload testbenches.
//
// Drives tck/tms/tdi of the array's 4-pin scan port and provides tasks:
// reset_tap, set_ir (instruction), wr (configuration write of unit/local
// word), rd (read back) and step (one single-step pulse). tck runs at one
// sixth of clk.
module tb_scan_master (
  input  logic clk,
  output logic tck,
  output logic tms,
  output logic tdi,
  input  logic tdo
);
  initial begin tck = 0; tms = 1; tdi = 0; end

  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (3) @(negedge clk);
    o = tdo;
    tck = 1;
    repeat (3) @(negedge clk);
    tck = 0;
  endtask

  task automatic reset_tap();
    logic o;
    repeat (5) tclk(1, 0, o);
    tclk(0, 0, o);
  endtask

  task automatic set_ir(input logic [3:0] v);
    logic o;
    tclk(1, 0, o); tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);
    for (int i = 0; i < 4; i++) tclk(i == 3, v[i], o);
    tclk(1, 0, o); tclk(0, 0, o);
  endtask

  task automatic shift_dr(input int n, input logic [52:0] v, output logic [52:0] cap);
    logic o;
    cap = '0;
    tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);
    for (int i = 0; i < n; i++) begin tclk(i == n - 1, v[i], o); cap[i] = o; end
    tclk(1, 0, o); tclk(0, 0, o);
  endtask

  task automatic wr(input int unit, input int lcl, input logic [39:0] d);
    logic [52:0] cap;
    shift_dr(53, {1'b1, 6'(unit), 6'(lcl), d}, cap);
  endtask

  task automatic rd(input int unit, input int lcl, output logic [39:0] d);
    logic [52:0] cap;
    shift_dr(53, {1'b0, 6'(unit), 6'(lcl), 40'd0}, cap);
    shift_dr(53, {1'b0, 6'(unit), 6'(lcl), 40'd0}, cap);
    d = cap[39:0];
  endtask
endmodule
