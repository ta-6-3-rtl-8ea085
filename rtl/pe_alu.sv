// pe_alu: 16-bit ALU of a processing element.
//
// Arithmetic goes through one carry-select adder (csel_adder); subtraction is
// a + ~b + 1. Logic operations and shifts act on the 16-bit word. Two
// operations serve DSP kernels, as in the source: a conditional select (CSEL,
// result = cc0 ? a : b) that gives maximum and minimum in two instructions
// after a SUB that sets cc0 from the sign, and a modified-Booth multiplication
// step (BOOTH). The BOOTH step takes the running partial product a, the
// multiplicand b and the 8-bit multiplier c, picks the radix-4 Booth digit
// d in {-2..2} from bits {c[2i+1], c[2i], c[2i-1]} (i = digit, c[-1] = 0), and
// returns (a + d*b) >>> 2 computed on 18 bits. Four steps with i = 0..3 give
// floor(b*c / 256), the upper 16 bits of a 16x8 product; the source pipelines
// four PEs for this. Which operations exist beyond add, subtract, logic, Booth
// step and conditional select, and all encodings, are this design's choice.
//
// Combinational. Flags: s = result[15], z = (result == 0), c = adder carry
// (for ADD/ADDC/SUB/NEG; 0 otherwise).
module pe_alu
  import paddi_pkg::*;
(
  input  alu_op_e     op,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic [15:0] c,
  input  logic [1:0]  digit,    // Booth digit index for OP_BOOTH
  input  logic        cc0,      // condition register, used by OP_CSEL
  input  logic        carry_in, // carry flag, used by OP_ADDC
  output logic [15:0] y,
  output flags_t      flags
);
  logic [15:0] add_a, add_b, add_s;
  logic        add_ci, add_co;

  csel_adder u_add (.a(add_a), .b(add_b), .cin(add_ci), .sum(add_s), .cout(add_co));

  // Booth step operands
  logic [8:0]         ext_c;          // {c[7:0], 0}: bit j is c[j-1]
  logic [2:0]         bbits;
  logic signed [2:0]  d;
  logic signed [17:0] bprod, bsum;

  always_comb begin
    ext_c = {c[7:0], 1'b0};
    bbits = ext_c[2*digit +: 3];
    d     = booth_digit(bbits);
    bprod = 18'(signed'(b)) * 18'(d);
    bsum  = 18'(signed'(a)) + bprod;
  end

  always_comb begin
    add_a  = a;
    add_b  = b;
    add_ci = 1'b0;
    unique case (op)
      OP_SUB:  begin add_b = ~b; add_ci = 1'b1; end
      OP_ADDC: add_ci = carry_in;
      OP_NEG:  begin add_a = 16'd0; add_b = ~a; add_ci = 1'b1; end
      default: ;
    endcase
  end

  always_comb begin
    flags.c = 1'b0;
    case (op)
      OP_ADD, OP_SUB, OP_ADDC, OP_NEG: begin y = add_s; flags.c = add_co; end
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_PASS:  y = a;
      OP_NOT:   y = ~a;
      OP_SHL:   y = a << b[3:0];
      OP_SHRA:  y = 16'($signed(a) >>> b[3:0]);
      OP_SHRL:  y = a >> b[3:0];
      OP_CSEL:  y = cc0 ? a : b;
      OP_BOOTH: y = 16'(bsum >>> 2);
      default:  y = 16'd0;
    endcase
    flags.s = y[15];
    flags.z = (y == 16'd0);
  end
endmodule
