// vedic_pp_accum -- partial product accumulation of a modified Vedic
// multiplier.
//
// A 2H x 2H modified multiplier forms four 2H-bit partial products from its
// operand halves: pp1 = a_lo*b_lo, pp2 = a_lo*b_hi, pp3 = a_hi*b_lo and
// pp4 = a_hi*b_hi. Each is cut into an H-bit low and high field and the
// 4H-bit product is assembled as four H-bit fields:
//   p[  H-1:0 ] = pp1.lo
//   p[ 2H-1:H ] = pp1.hi + pp2.lo + pp3.lo                 (adder 1)
//   p[3H-1:2H ] = pp4.lo + pp2.hi + pp3.hi + carry(adder 1) (adder 2)
//   p[4H-1:3H ] = pp4.hi + carry(adder 2)
// Each adder sums three H-bit fields (plus a carry of at most 2), so its
// carry out is at most 2 and needs two bits. The top field cannot overflow
// because the full product fits in 4H bits.
//
// Interface: pp1..pp4 are 2H bits, p is 4H bits. Timing: combinational.
//
// The field split, the two adders and the carry hand-over are the
// documented accumulation scheme; the adders are plain '+' operators, as the
// adder architecture is left open.
module vedic_pp_accum #(
  parameter int unsigned H = 2
) (
  input  logic [2*H-1:0] pp1,
  input  logic [2*H-1:0] pp2,
  input  logic [2*H-1:0] pp3,
  input  logic [2*H-1:0] pp4,
  output logic [4*H-1:0] p
);
  logic [H+1:0] sum_mid_lo;   // adder 1: pp1.hi + pp2.lo + pp3.lo
  logic [H+1:0] sum_mid_hi;   // adder 2: pp4.lo + pp2.hi + pp3.hi + carry
  logic [H-1:0] top_field;

  always_comb begin
    sum_mid_lo = (H+2)'(pp1[2*H-1:H]) + (H+2)'(pp2[H-1:0]) + (H+2)'(pp3[H-1:0]);
    sum_mid_hi = (H+2)'(pp4[H-1:0]) + (H+2)'(pp2[2*H-1:H]) + (H+2)'(pp3[2*H-1:H])
               + (H+2)'(sum_mid_lo[H+1:H]);
    top_field  = pp4[2*H-1:H] + H'(sum_mid_hi[H+1:H]);
    p = {top_field, sum_mid_hi[H-1:0], sum_mid_lo[H-1:0], pp1[H-1:0]};
  end
endmodule
