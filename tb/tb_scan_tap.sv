// tb_scan_tap: self-checking test of the 4-pin scan port.
//
// Drives the pins as a scan master would: configuration writes of random
// words to random addresses, checked against what arrives on the
// configuration bus; read-back through a memory model here; the captured
// instruction value on tdo; the 1-bit bypass; run/halt; and single step
// giving exactly one clock of run per update.
module tb_scan_tap;
  import paddi_pkg::*;

  logic        clk = 0, rst_n = 0, tck = 0, tms = 1, tdi = 0, tdo;
  logic        cfg_we, run;
  logic [11:0] cfg_addr;
  logic [39:0] cfg_wdata, cfg_rdata;
  logic [39:0] mem [logic [11:0]];
  logic [11:0] last_wa;
  logic [39:0] last_wd;
  int          nwrites = 0, run_cycles = 0;
  int checks = 0, failures = 0;

  scan_tap dut (.*);
  always #5 clk = ~clk;

  // configuration target model
  always_ff @(posedge clk) begin
    if (cfg_we) begin
      mem[cfg_addr] = cfg_wdata;
      last_wa <= cfg_addr; last_wd <= cfg_wdata;
      nwrites <= nwrites + 1;
    end
    if (run) run_cycles <= run_cycles + 1;
  end
  assign cfg_rdata = mem.exists(cfg_addr) ? mem[cfg_addr] : 40'd0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one tck period; returns tdo sampled before the rising edge
  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(negedge clk);
    o = tdo;
    tck = 1;
    repeat (4) @(negedge clk);
    tck = 0;
  endtask

  task automatic tap_reset();
    logic o;
    repeat (5) tclk(1, 0, o);
    tclk(0, 0, o);                // Run-Test/Idle
  endtask

  task automatic shift_ir(input logic [3:0] v, output logic [3:0] cap);
    logic o;
    tclk(1, 0, o); tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);  // -> Shift-IR
    for (int i = 0; i < 4; i++) begin tclk(i == 3, v[i], o); cap[i] = o; end
    tclk(1, 0, o); tclk(0, 0, o);                               // Update-IR -> RTI
  endtask

  task automatic shift_dr(input int n, input logic [52:0] v, output logic [52:0] cap);
    logic o;
    cap = '0;
    tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);                // -> Shift-DR
    for (int i = 0; i < n; i++) begin tclk(i == n - 1, v[i], o); cap[i] = o; end
    tclk(1, 0, o); tclk(0, 0, o);                               // Update-DR -> RTI
  endtask

  initial begin
    logic [3:0]  icap;
    logic [52:0] dcap;
    logic [11:0] addrs [8];
    logic [39:0] datas [8];
    int r0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    tap_reset();
    chk(!run, "halted after reset");
    shift_ir(4'h1, icap);
    chk(icap == 4'b0101, "IR capture value");
    // writes
    for (int n = 0; n < 8; n++) begin
      int w;
      addrs[n] = 12'($urandom); datas[n] = {8'($urandom), 32'($urandom)};
      w = nwrites;
      shift_dr(53, {1'b1, addrs[n], datas[n]}, dcap);
      repeat (2) @(negedge clk);
      chk(nwrites == w + 1 && last_wa == addrs[n] && last_wd == datas[n], "config write");
    end
    // reads: set the address (no write), then capture
    for (int n = 0; n < 8; n++) begin
      int w;
      w = nwrites;
      shift_dr(53, {1'b0, addrs[n], 40'd0}, dcap);
      shift_dr(53, {1'b0, addrs[n], 40'd0}, dcap);
      chk(nwrites == w, "read does not write");
      chk(dcap[39:0] == mem[addrs[n]] && dcap[51:40] == addrs[n], "read-back");
    end
    // bypass: one bit of delay
    shift_ir(4'hF, icap);
    shift_dr(8, 53'h0A5, dcap);
    chk(dcap[7:1] == 7'h25 && dcap[0] == 1'b0, "bypass delay");
    // run / halt
    shift_ir(4'h2, icap);
    chk(run, "run");
    shift_ir(4'h3, icap);
    chk(!run, "halt");
    // single step: three updates, three clock cycles of run
    shift_ir(4'h4, icap);
    r0 = run_cycles;
    for (int n = 0; n < 3; n++) shift_dr(1, 53'd0, dcap);
    chk(run_cycles - r0 == 3, $sformatf("single step count %0d", run_cycles - r0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
