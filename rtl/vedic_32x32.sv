// vedic_32x32 -- 32-bit by 32-bit unsigned Vedic multiplier.
//
// How it works: the operands are split into high and low 16-bit halves.
// Four vedic_16x16 multipliers form the partial products A_H*B_H, A_H*B_L,
// A_L*B_H and A_L*B_L in parallel (the vertical and crosswise products of
// the Urdhva Tiryakbhyam method, one level up), and vedic_combine adds them
// with two carry save adders into the 64-bit product.  The whole
// multiplier is built this way from 2x2 cells upward: 2x2 -> 4x4 -> 8x8 ->
// 16x16 -> 32x32.
//
// Interface: a, b are unsigned 32-bit operands; q = a * b (64 bits).
// Timing: purely combinational, no clock and no reset.
//
// The hierarchy and the quartering of the operands follow the published
// design; the operands are taken as unsigned, which the source material does
// not state but its examples imply.
module vedic_32x32 (
  input  logic [32-1:0]   a,
  input  logic [32-1:0]   b,
  output logic [2*32-1:0] q
);

  localparam int unsigned H = 16;

  logic [2*H-1:0] p_hh, p_hl, p_lh, p_ll;

  vedic_16x16 u_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .q(p_hh));
  vedic_16x16 u_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .q(p_hl));
  vedic_16x16 u_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .q(p_lh));
  vedic_16x16 u_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .q(p_ll));

  vedic_combine #(.H(H)) u_combine (
    .p_hh (p_hh),
    .p_hl (p_hl),
    .p_lh (p_lh),
    .p_ll (p_ll),
    .q    (q)
  );

endmodule
