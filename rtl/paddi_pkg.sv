// paddi_pkg: types and constants shared by the PADDI-2 style array.
//
// The array is 48 processing elements (PEs) of 16 bits, grouped in 12
// clusters of 4. Each PE has an 8-word x 40-bit program store, three 2-word
// data buffers (DQ0-DQ2) and two control-stream queues (CQ0, CQ1). These sizes
// follow the chip description. The bit layout of the 40-bit instruction, the
// opcode encoding, the bus-select encodings and the configuration address map
// are this design's own choices; the source prints no encodings.
//
// Instruction word (40 bits, MSB first):
//   [39:35] op      ALU operation (alu_op_e)
//   [34:32] sa      source A   (src code, see below)
//   [31:29] sb      source B
//   [28:26] sc      source C   (Booth multiplier operand)
//   [25:23] dst     destination register r0..r5
//   [22]    wen     write result to dst
//   [21]    oen     send result on the data output channel
//   [20]    coen    send the new cc0 on the control output channel
//   [19:18] ccsel   cc0 update: keep / sign / zero / carry
//   [17:16] bcond   branch condition: always / new cc0 / CQ0 head / CQ1 head
//   [15:13] next_t  next PC when the condition holds
//   [12:10] next_f  next PC when it does not
//   [9:0]   imm     signed immediate; for BOOTH, imm[1:0] is the digit index
//
// Source codes: 0..5 name registers r0..r5, where r(2i) and r(2i+1) are the two
// words of DQi. When DQi is a queue, code 2i reads its head and pops it and
// code 2i+1 reads the head without popping. Code 6 is the immediate, 7 is zero.
package paddi_pkg;

  localparam int unsigned DW       = 16;  // datapath width
  localparam int unsigned IW       = 40;  // instruction width
  localparam int unsigned IDEPTH   = 8;   // program store words
  localparam int unsigned PCW      = 3;
  localparam int unsigned NDQ      = 3;   // data buffers per PE
  localparam int unsigned NCQ      = 2;   // control queues per PE
  localparam int unsigned QDEPTH   = 2;   // words per buffer
  localparam int unsigned NPE_CL   = 4;   // PEs per cluster
  localparam int unsigned NCL      = 12;  // clusters
  localparam int unsigned NL1      = 6;   // level-1 buses per cluster
  localparam int unsigned NL2      = 16;  // level-2 buses
  localparam int unsigned NIO      = 8;   // PEs that double as I/O processors
  localparam int unsigned CFG_AW   = 12;  // configuration address width
  localparam int unsigned CFG_DW   = 40;  // configuration data width

  typedef enum logic [4:0] {
    OP_ADD   = 5'd0,   // a + b
    OP_SUB   = 5'd1,   // a - b
    OP_AND   = 5'd2,
    OP_OR    = 5'd3,
    OP_XOR   = 5'd4,
    OP_PASS  = 5'd5,   // a
    OP_NOT   = 5'd6,   // ~a
    OP_SHL   = 5'd7,   // a << b[3:0]
    OP_SHRA  = 5'd8,   // a >>> b[3:0]
    OP_SHRL  = 5'd9,   // a >> b[3:0]
    OP_CSEL  = 5'd10,  // cc0 ? a : b   (conditional select)
    OP_BOOTH = 5'd11,  // (a + d*b) >>> 2, d = radix-4 Booth digit of c
    OP_ADDC  = 5'd12,  // a + b + carry flag
    OP_NEG   = 5'd13   // 0 - a
  } alu_op_e;

  typedef enum logic [1:0] {CC_KEEP = 2'd0, CC_S = 2'd1, CC_Z = 2'd2, CC_C = 2'd3} ccsel_e;
  typedef enum logic [1:0] {BR_ALWAYS = 2'd0, BR_CC0 = 2'd1, BR_CQ0 = 2'd2, BR_CQ1 = 2'd3} bcond_e;

  localparam logic [2:0] SRC_IMM  = 3'd6;
  localparam logic [2:0] SRC_ZERO = 3'd7;

  typedef struct packed {
    alu_op_e        op;
    logic [2:0]     sa;
    logic [2:0]     sb;
    logic [2:0]     sc;
    logic [2:0]     dst;
    logic           wen;
    logic           oen;
    logic           coen;
    ccsel_e         ccsel;
    bcond_e         bcond;
    logic [PCW-1:0] next_t;
    logic [PCW-1:0] next_f;
    logic [9:0]     imm;
  } instr_t;

  // ALU status flags
  typedef struct packed {
    logic s;  // sign of result
    logic z;  // result is zero
    logic c;  // carry out of the adder
  } flags_t;

  // Level-1 bus attachment to the level-2 network.
  typedef enum logic [1:0] {L2_NONE = 2'd0, L2_DRIVE = 2'd1, L2_RECV = 2'd2} l2mode_e;

  // Port select codes on a PE input (DQ or CQ): 0..5 level-1 bus,
  // 6 neighbour PE, 7 none (external pins on the I/O port of an I/O PE).
  localparam logic [2:0] SEL_NEIGH = 3'd6;
  localparam logic [2:0] SEL_NONE  = 3'd7;
  // Output bus codes: 0..5 level-1 bus, 6 none, 7 external pins (I/O PE).
  localparam logic [2:0] OUT_NONE  = 3'd6;
  localparam logic [2:0] OUT_EXT   = 3'd7;

  // Configuration address: {unit[5:0], local[5:0]}.
  //   unit 0..47  : PE (local 0-7 program words, 8-13 r0..r5, 14 buffer modes,
  //                 15 PC/cc0 preset, 16 status, read only)
  //   unit 48..59 : cluster switches (local 0-3 PE port selects,
  //                 4-9 data bus L2 attachment, 10-15 control bus L2 attachment)
  //   unit 60     : level-2 break switches (local 0 data, 1 control)
  localparam logic [5:0] UNIT_CL0 = 6'd48;
  localparam logic [5:0] UNIT_L2  = 6'd60;

  typedef struct packed {
    logic              we;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] wdata;
  } cfg_req_t;

  // PE port select word in the cluster configuration (21 bits).
  typedef struct packed {
    logic [2:0] cout_bus;   // control output bus
    logic [2:0] out_bus;    // data output bus
    logic [2:0] cq1_sel;
    logic [2:0] cq0_sel;
    logic [2:0] dq2_sel;
    logic [2:0] dq1_sel;
    logic [2:0] dq0_sel;
  } pecfg_t;

  // Radix-4 Booth digit for multiplier bits {y[2i+1], y[2i], y[2i-1]}.
  function automatic logic signed [2:0] booth_digit(input logic [2:0] bits);
    case (bits)
      3'b000, 3'b111: return 3'sd0;
      3'b001, 3'b010: return 3'sd1;
      3'b011:         return 3'sd2;
      3'b100:         return -3'sd2;
      default:        return -3'sd1;  // 101, 110
    endcase
  endfunction

endpackage
