// csel_adder: 16-bit carry-select adder used by the PE ALU.
//
// The word is cut into blocks of growing size (3, 4, 4, 5 bits from the LSB).
// Every block above the first computes its sum twice, once for a carry-in of 0
// and once for 1, with a ripple chain; the real carry coming out of the block
// below then picks one of the two results. The carry path is therefore one mux
// per block instead of one full adder per bit. The ALU being a carry-select
// adder with tuned block sizes follows the source; the block sizes themselves
// are this design's choice, as the source does not print them.
//
// Purely combinational: sum = a + b + cin, cout is the carry out of bit 15.
module csel_adder (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  // Block boundaries: block k covers bits [LO[k] +: SZ[k]].
  localparam int NBLK = 4;
  localparam int SZ [NBLK] = '{3, 4, 4, 5};
  localparam int LO [NBLK] = '{0, 3, 7, 11};

  logic [NBLK:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [SZ[k]:0] s0, s1;  // {carry out, sum} for carry-in 0 and 1
    assign s0 = {1'b0, a[LO[k] +: SZ[k]]} + {1'b0, b[LO[k] +: SZ[k]]};
    assign s1 = {1'b0, a[LO[k] +: SZ[k]]} + {1'b0, b[LO[k] +: SZ[k]]} + {{SZ[k]{1'b0}}, 1'b1};
    assign sum[LO[k] +: SZ[k]] = carry[k] ? s1[SZ[k]-1:0] : s0[SZ[k]-1:0];
    assign carry[k+1]          = carry[k] ? s1[SZ[k]]     : s0[SZ[k]];
  end

  assign cout = carry[NBLK];
endmodule
