// vedic_mul64 -- 64 x 64-bit unsigned Vedic multiplier (top level).
//
// The product is built as a tree of modified Vedic multipliers: the 64x64
// multiplier splits into four 32x32 ones, each of those into four 16x16,
// and so on, with a partial product accumulator at every node. The
// splitting stops at width PM_W, where a pipelined Vedic multiplier (the
// vertical-and-crosswise column method) computes the leaf product. The
// default PM_W = 2 is the preferred architecture: 1024 2x2 column
// multipliers and the narrowest adders. PM_W = 4, 8, 16 and 32 give the
// four alternative architectures with 256, 64, 16 and 4 leaf multipliers.
//
// Interface: a, b are N-bit unsigned operands; p = a*b is 2N bits.
// Timing: combinational, the product is valid one propagation delay after
// the operands. No clock or handshake is described for the multiplier, so
// none is added.
//
// N is kept a parameter (default 64) so smaller versions can be built; the
// architecture itself is the documented one.
module vedic_mul64 #(
  parameter int unsigned N    = 64,
  parameter int unsigned PM_W = 2
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  vedic_modified_vm #(.N(N), .PM_W(PM_W)) u_vm (.a(a), .b(b), .p(p));
endmodule
