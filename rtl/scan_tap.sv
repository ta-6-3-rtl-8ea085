// scan_tap: 4-pin JTAG-like scan port of the chip.
//
// The port (tck, tms, tdi, tdo) downloads PE programs, sets the network
// switches, presets the PE register files and observes PE state, and it
// controls execution: run, halt and single step, as the source lists. The
// controller is the standard 16-state test-access-port state machine driven
// by tms, with a 4-bit instruction register:
//   CFG   (4'h1) data register of 53 bits {write, addr[11:0], data[39:0]},
//                shifted LSB first. Update-DR latches addr/data and, if the
//                write bit is set, issues one configuration write. Capture-DR
//                loads the word read back from the last latched address, so a
//                read is one scan to set the address and one to fetch the data.
//   RUN   (4'h2) Update-IR starts free-running execution.
//   HALT  (4'h3) Update-IR stops execution.
//   STEP  (4'h4) every Update-DR lets the array execute for one clock cycle.
//   other        1-bit bypass register.
// The capture value of the instruction register is 4'b0101.
//
// Timing: the port is sampled with the array clock. tck is synchronised with
// two flip-flops and the state machine advances one step per rising tck edge
// seen, so tck must stay below a quarter of the clock rate; tdo changes after
// the falling tck edge. Running the port in the array clock domain, the
// instruction codes and the register layout are this design's choices; the
// source says only that the port is 4 bits wide and JTAG-like.
module scan_tap
  import paddi_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo,
  // configuration bus
  output logic              cfg_we,
  output logic [CFG_AW-1:0] cfg_addr,
  output logic [CFG_DW-1:0] cfg_wdata,
  input  logic [CFG_DW-1:0] cfg_rdata,
  // execution control
  output logic              run
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_e;

  localparam logic [3:0] I_CFG  = 4'h1;
  localparam logic [3:0] I_RUN  = 4'h2;
  localparam logic [3:0] I_HALT = 4'h3;
  localparam logic [3:0] I_STEP = 4'h4;
  localparam int unsigned DRW = 1 + CFG_AW + CFG_DW;

  tap_e            st, st_n;
  logic [2:0]      tck_s;
  logic            rise, fall;
  logic [3:0]      ir, ir_sr;
  logic [DRW-1:0]  dr;
  logic            run_r, step;

  assign rise = tck_s[1] & ~tck_s[2];
  assign fall = ~tck_s[1] & tck_s[2];

  always_comb begin
    unique case (st)
      TLR:    st_n = tms ? TLR    : RTI;
      RTI:    st_n = tms ? SEL_DR : RTI;
      SEL_DR: st_n = tms ? SEL_IR : CAP_DR;
      CAP_DR: st_n = tms ? EX1_DR : SH_DR;
      SH_DR:  st_n = tms ? EX1_DR : SH_DR;
      EX1_DR: st_n = tms ? UPD_DR : PAU_DR;
      PAU_DR: st_n = tms ? EX2_DR : PAU_DR;
      EX2_DR: st_n = tms ? UPD_DR : SH_DR;
      UPD_DR: st_n = tms ? SEL_DR : RTI;
      SEL_IR: st_n = tms ? TLR    : CAP_IR;
      CAP_IR: st_n = tms ? EX1_IR : SH_IR;
      SH_IR:  st_n = tms ? EX1_IR : SH_IR;
      EX1_IR: st_n = tms ? UPD_IR : PAU_IR;
      PAU_IR: st_n = tms ? EX2_IR : PAU_IR;
      EX2_IR: st_n = tms ? UPD_IR : SH_IR;
      UPD_IR: st_n = tms ? SEL_DR : RTI;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_s     <= '0;
      st        <= TLR;
      ir        <= 4'hF;
      ir_sr     <= '0;
      dr        <= '0;
      tdo       <= 1'b0;
      cfg_we    <= 1'b0;
      cfg_addr  <= '0;
      cfg_wdata <= '0;
      run_r     <= 1'b0;
      step      <= 1'b0;
    end else begin
      tck_s  <= {tck_s[1:0], tck};
      cfg_we <= 1'b0;
      step   <= 1'b0;
      if (rise) begin
        st <= st_n;
        unique case (st)
          TLR:    ir <= 4'hF;
          CAP_DR: dr <= (ir == I_CFG) ? {1'b0, cfg_addr, cfg_rdata} : '0;
          SH_DR:  if (ir == I_CFG) dr <= {tdi, dr[DRW-1:1]};
                  else             dr[0] <= tdi;
          UPD_DR: begin
            if (ir == I_CFG) begin
              cfg_addr  <= dr[CFG_DW +: CFG_AW];
              cfg_wdata <= dr[CFG_DW-1:0];
              cfg_we    <= dr[DRW-1];
            end
            if (ir == I_STEP) step <= 1'b1;
          end
          CAP_IR: ir_sr <= 4'b0101;
          SH_IR:  ir_sr <= {tdi, ir_sr[3:1]};
          UPD_IR: begin
            ir <= ir_sr;
            if (ir_sr == I_RUN)  run_r <= 1'b1;
            if (ir_sr == I_HALT) run_r <= 1'b0;
          end
          default: ;
        endcase
      end
      if (fall) begin
        if (st == SH_DR)      tdo <= dr[0];
        else if (st == SH_IR) tdo <= ir_sr[0];
      end
    end
  end

  assign run = run_r | step;
endmodule
