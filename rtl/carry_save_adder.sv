// carry_save_adder -- adds three unsigned W-bit operands.
//
// How it works: a row of W full adders compresses the three operands into a
// sum vector (bitwise XOR) and a carry vector (bitwise majority) without any
// carry propagation (the carry-save step).  One carry-propagate addition of
// the sum vector and the carry vector shifted left by one then resolves the
// result.  The result is W+2 bits wide, enough for 3*(2^W - 1).
//
// Interface: x, y, z are W-bit operands; s = x + y + z (W+2 bits).
// Timing: purely combinational.
//
// The multiplier tree adds its partial products with carry save adders;
// the 3:2 row followed by a single carry-propagate adder is this design's
// reading of that, and the width W has no default in the source material
// (16 is picked to suit the widest use, the 32x32 level uses W = 32).
module carry_save_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W+1:0] s
);

  logic [W-1:0] sum_vec;   // per-bit sum of the full-adder row
  logic [W-1:0] car_vec;   // per-bit carry of the full-adder row, weight 2

  always_comb begin
    for (int i = 0; i < W; i++) begin
      sum_vec[i] = x[i] ^ y[i] ^ z[i];
      car_vec[i] = (x[i] & y[i]) | (x[i] & z[i]) | (y[i] & z[i]);
    end
    s = (W+2)'(sum_vec) + ((W+2)'(car_vec) << 1);
  end

endmodule
