// vedic_combine -- joins the four partial products of one level of the
// Vedic multiplier tree into the product of the next level.
//
// An N x N product (N = 2H) is split into four H x H products:
//   p_hh = A_H * B_H   p_hl = A_H * B_L   p_lh = A_L * B_H   p_ll = A_L * B_L
// each 2H bits wide.  The adder network is:
//   * q[H-1:0]   : the low half of p_ll, passed straight through.
//   * middle carry save adder: p_hl + p_lh + p_ll[2H-1:H]  -> mid (2H+2 bits);
//     its low H bits are q[2H-1:H].
//   * upper carry save adder: p_hh + mid[2H+1:H]          -> q[4H-1:2H].
// The upper adder receives the middle adder's bits 2H+1..H, i.e. its upper
// half together with the two carry bits, so no carry is lost between the
// two adders.  Its third operand is tied to zero, and the two carry bits of
// its own result are always zero because the full product fits in 4H bits
// (checked by an assertion).
//
// Interface: four 2H-bit partial products in, 4H-bit product out.
// Timing: purely combinational.
//
// The block arrangement (one pass-through, a middle and an upper carry save
// adder, and the bit ranges each receives) follows the published 32x32
// block diagram; carrying the middle adder's two carry bits on, and the
// zero third operand of the upper adder, are this design's choices.
module vedic_combine #(
  parameter int unsigned H = 16   // width of the operand halves; N = 2H
) (
  input  logic [2*H-1:0] p_hh,
  input  logic [2*H-1:0] p_hl,
  input  logic [2*H-1:0] p_lh,
  input  logic [2*H-1:0] p_ll,
  output logic [4*H-1:0] q
);

  logic [2*H+1:0] mid;      // middle adder result
  logic [2*H-1:0] mid_up;   // mid[2H+1:H], zero-extended to 2H bits
  logic [2*H+1:0] upper;    // upper adder result

  carry_save_adder #(.W(2*H)) u_csa_mid (
    .x (p_hl),
    .y (p_lh),
    .z ({{H{1'b0}}, p_ll[2*H-1:H]}),
    .s (mid)
  );

  assign mid_up = (2*H)'(mid[2*H+1:H]);

  carry_save_adder #(.W(2*H)) u_csa_up (
    .x (p_hh),
    .y (mid_up),
    .z ('0),
    .s (upper)
  );

  assign q = {upper[2*H-1:0], mid[H-1:0], p_ll[H-1:0]};

  // The product of two 2H-bit operands fits in 4H bits, so the upper adder
  // never carries out when the partial products are consistent.
  always_comb begin
    assert (upper[2*H+1:2*H] == 2'b00)
      else $error("vedic_combine: upper adder carried out");
  end

endmodule
