// tb_pe_imem: self-checking test of the 8 x 40-bit program store.
//
// Writes random words to every address, then reads them back on both read
// ports in random order against a copy held here.
module tb_pe_imem;
  logic        clk = 0, rst_n = 0, we;
  logic [2:0]  waddr, raddr, raddr2;
  logic [39:0] wdata, rdata, rdata2;
  logic [39:0] ref_mem [8];
  int checks = 0, failures = 0;

  pe_imem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0; raddr2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 8; i++) begin
        we = 1; waddr = 3'(i); wdata = {8'($urandom), 32'($urandom)};
        ref_mem[i] = wdata;
        @(negedge clk);
      end
      we = 0;
      for (int n = 0; n < 16; n++) begin
        raddr = 3'($urandom); raddr2 = 3'($urandom); #1;
        checks++;
        if (rdata !== ref_mem[raddr] || rdata2 !== ref_mem[raddr2]) begin
          failures++;
          $display("FAIL read %0d/%0d", raddr, raddr2);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
