// tb_pe_dq: self-checking test of the 2-word PE buffer.
//
// Queue mode: random pushes and pops against a reference queue held in the
// testbench, checking order, the ready signal (no room when two words wait)
// and the count. Register mode: writes and reads of both words, and that the
// network cannot push. Configuration presets and mode switching.
module tb_pe_dq;
  logic        clk = 0, rst_n = 0;
  logic        push_valid, pop, rf_we, rf_idx, cfg_we, mode_rf, push_ready;
  logic [15:0] push_data, rf_wdata, head, word0, word1, cfg_wdata;
  logic [1:0]  count, cfg_idx;
  logic [2:0]  cfg_mode;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  pe_dq #(.WIDTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    push_valid = 0; pop = 0; rf_we = 0; rf_idx = 0; cfg_we = 0;
    push_data = 0; rf_wdata = 0; cfg_wdata = 0; cfg_idx = 0; cfg_mode = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(count == 0 && push_ready && !mode_rf, "reset state");
    // queue mode traffic
    for (int n = 0; n < 2000; n++) begin
      logic exp_ready;
      push_valid = 1'($urandom);
      push_data  = 16'($urandom);
      pop        = 1'($urandom);
      exp_ready  = (q.size() < 2);
      #1;
      chk(push_ready == exp_ready, "ready");
      chk(count == 2'(q.size()), "count");
      if (q.size() > 0) chk(head == q[0], "head order");
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push_valid && exp_ready) q.push_back(push_data);
      @(negedge clk);
    end
    push_valid = 0; pop = 0;
    // register-file mode
    cfg_we = 1; cfg_idx = 2; cfg_mode = 3'b001;
    @(negedge clk);
    cfg_we = 0;
    chk(mode_rf && !push_ready && count == 0, "rf mode");
    rf_we = 1; rf_idx = 0; rf_wdata = 16'h1234; @(negedge clk);
    rf_idx = 1; rf_wdata = 16'hBEEF; @(negedge clk);
    rf_we = 0; push_valid = 1; push_data = 16'hDEAD; @(negedge clk);
    push_valid = 0;
    chk(word0 == 16'h1234 && word1 == 16'hBEEF, "rf words");
    // preset
    cfg_we = 1; cfg_idx = 0; cfg_wdata = 16'h0A0A; @(negedge clk);
    cfg_idx = 2; cfg_mode = 3'b100; @(negedge clk);  // queue, two words waiting
    cfg_we = 0;
    chk(!mode_rf && count == 2 && head == 16'h0A0A && !push_ready, "preset queue");
    pop = 1; @(negedge clk); pop = 0;
    chk(count == 1 && head == 16'hBEEF, "pop preset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
