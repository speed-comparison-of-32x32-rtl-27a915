// vedic_2x2 -- 2-bit by 2-bit multiplier, the leaf cell of the Vedic
// (Urdhva Tiryakbhyam, "vertically and crosswise") multiplier tree.
//
// How it works: the product is formed column by column, as in the
// vertically-and-crosswise method.  Column 0 is the vertical product a0*b0.
// Column 1 is the crosswise pair a1*b0 + a0*b1, summed in a half adder whose
// carry moves to the next column.  Column 2 is the vertical product a1*b1
// plus that carry, summed in a second half adder whose carry is bit 3.
// Four AND gates and two half adders in all.
//
// Interface: a, b are unsigned 2-bit operands; q = a * b (4 bits).
// Timing: purely combinational, no clock and no reset.
//
// The column scheme follows the vertically-and-crosswise method; the exact
// gate-level form (AND gates plus two half adders) is this design's choice.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic pp00, pp01, pp10, pp11;   // bit products a_i * b_j
  logic c1;                       // carry out of column 1

  always_comb begin
    pp00 = a[0] & b[0];
    pp10 = a[1] & b[0];
    pp01 = a[0] & b[1];
    pp11 = a[1] & b[1];
    // column 0: vertical
    q[0] = pp00;
    // column 1: crosswise, half adder
    q[1] = pp10 ^ pp01;
    c1   = pp10 & pp01;
    // column 2: vertical plus carry, half adder; its carry is column 3
    q[2] = pp11 ^ c1;
    q[3] = pp11 & c1;
  end

endmodule
