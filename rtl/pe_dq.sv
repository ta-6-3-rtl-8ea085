// pe_dq: 2-word input buffer of a PE (DQ0-DQ2 for data, CQ0/CQ1 for control).
//
// The buffer works either as a 2-entry FIFO that the network fills (queue
// mode) or as two registers that the PE's own instructions write (register
// file mode), as the source describes for the data buffers. Control queues use
// the same module at WIDTH = 1 and stay in queue mode.
//
// Network side: push_valid/push_data with push_ready; a word enters at the
// clock edge when push_valid && push_ready. push_ready is high only in queue
// mode with a free entry, so it is computed from state alone and can join the
// bus handshake without a combinational path back from push_valid.
// PE side: head is the oldest word; pop removes it at the clock edge. In
// register mode word0/word1 are the registers and rf_we writes one of them.
// Configuration side (scan): cfg_we with cfg_idx 0/1 presets a word, cfg_idx
// 2 writes {count[1:0], mode_rf} and resets the read pointer; all state is
// readable on word0, word1, count and mode_rf. Presetting and reading through
// the configuration path stands in for the scan chain of the source.
module pe_dq #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // network side
  input  logic             push_valid,
  input  logic [WIDTH-1:0] push_data,
  output logic             push_ready,
  // PE side
  input  logic             pop,
  input  logic             rf_we,
  input  logic             rf_idx,
  input  logic [WIDTH-1:0] rf_wdata,
  output logic [WIDTH-1:0] head,
  output logic [WIDTH-1:0] word0,
  output logic [WIDTH-1:0] word1,
  output logic [1:0]       count,
  output logic             mode_rf,
  // configuration side
  input  logic             cfg_we,
  input  logic [1:0]       cfg_idx,
  input  logic [WIDTH-1:0] cfg_wdata,
  input  logic [2:0]       cfg_mode  // {count, mode_rf} for cfg_idx == 2
);
  logic [WIDTH-1:0] mem [2];
  logic             rdptr;
  logic             do_push, do_pop;

  assign push_ready = !mode_rf && (count != 2'd2);
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop && !mode_rf && (count != 2'd0);
  assign head       = mem[rdptr];
  assign word0      = mem[0];
  assign word1      = mem[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem[0]  <= '0;
      mem[1]  <= '0;
      rdptr   <= 1'b0;
      count   <= 2'd0;
      mode_rf <= 1'b0;
    end else if (cfg_we) begin
      case (cfg_idx)
        2'd0: mem[0] <= cfg_wdata;
        2'd1: mem[1] <= cfg_wdata;
        2'd2: begin
          mode_rf <= cfg_mode[0];
          count   <= cfg_mode[2:1];
          rdptr   <= 1'b0;
        end
        default: ;
      endcase
    end else begin
      if (mode_rf) begin
        if (rf_we) mem[rf_idx] <= rf_wdata;
      end else begin
        if (do_push) mem[rdptr ^ count[0]] <= push_data;
        if (do_pop)  rdptr <= ~rdptr;
        count <= count + {1'b0, do_push} - {1'b0, do_pop};
      end
    end
  end

  // A push never lands on a full queue and a pop never on an empty one.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(mode_rf == 1'b0 && count == 2'd2 && do_push));
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= 2'd2);
endmodule
