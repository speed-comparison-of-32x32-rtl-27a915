// vedic_4x4 -- 4-bit by 4-bit unsigned Vedic multiplier.
//
// How it works: the operands are split into high and low 2-bit halves.
// Four vedic_2x2 multipliers form the partial products A_H*B_H, A_H*B_L,
// A_L*B_H and A_L*B_L in parallel (the vertical and crosswise products of
// the Urdhva Tiryakbhyam method, one level up), and vedic_combine adds them
// with two carry save adders into the 8-bit product.  The whole
// multiplier is built this way from 2x2 cells upward: 2x2 -> 4x4 -> 8x8 ->
// 16x16 -> 32x32.
//
// Interface: a, b are unsigned 4-bit operands; q = a * b (8 bits).
// Timing: purely combinational, no clock and no reset.
//
// The hierarchy and the quartering of the operands follow the published
// design; the operands are taken as unsigned, which the source material does
// not state but its examples imply.
module vedic_4x4 (
  input  logic [4-1:0]   a,
  input  logic [4-1:0]   b,
  output logic [2*4-1:0] q
);

  localparam int unsigned H = 2;

  logic [2*H-1:0] p_hh, p_hl, p_lh, p_ll;

  vedic_2x2 u_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .q(p_hh));
  vedic_2x2 u_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .q(p_hl));
  vedic_2x2 u_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .q(p_lh));
  vedic_2x2 u_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .q(p_ll));

  vedic_combine #(.H(H)) u_combine (
    .p_hh (p_hh),
    .p_hl (p_hl),
    .p_lh (p_lh),
    .p_ll (p_ll),
    .q    (q)
  );

endmodule
