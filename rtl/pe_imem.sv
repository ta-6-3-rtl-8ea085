// pe_imem: program store of a PE, 8 words of 40 bits.
//
// Written only through the configuration (scan) path while the program is
// downloaded; read asynchronously by the fetch stage, which registers the word
// into the instruction register. Depth and width follow the source; the
// asynchronous read, which lets a branch resolved in the execute stage select
// the very next fetch (zero-latency branch), is this design's choice.
module pe_imem #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 40
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic [$clog2(DEPTH)-1:0] raddr2,  // second read port for scan-out
  output logic [WIDTH-1:0]         rdata2
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata  = mem[raddr];
  assign rdata2 = mem[raddr2];
endmodule
