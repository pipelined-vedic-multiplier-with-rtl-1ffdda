// vedic_modified_vm -- N x N unsigned modified Vedic multiplier.
//
// A modified Vedic multiplier splits its operands into halves, forms the
// four half-width partial products a_lo*b_lo, a_lo*b_hi, a_hi*b_lo and
// a_hi*b_hi with four smaller multipliers and adds them with
// vedic_pp_accum. The smaller multipliers are modified multipliers again,
// down to width PM_W, where a pipelined (vertical-and-crosswise column)
// multiplier, ut_pipelined_vm, forms the product directly. PM_W sets the
// adder complexity: for N = 64, PM_W = 2 gives 1024 2x2 column multipliers
// and the narrowest adders, PM_W = 32 gives four 32x32 ones.
//
// The tree is written level by level rather than as a module that
// instantiates itself. Level 0 holds the 4**LEVELS leaf multipliers of
// width PM_W; level l holds 4**(LEVELS-l) nodes of width PM_W << l, and
// level LEVELS is the single N x N node. Node j of level l takes the
// products of nodes 4j (lo*lo), 4j+1 (lo*hi), 4j+2 (hi*lo) and 4j+3
// (hi*hi) of level l-1. Each base-4 digit of a leaf's index therefore says
// which operand halves it sits in at one level: its high bit selects the
// upper half of a, its low bit the upper half of b.
//
// Interface: a, b are N-bit unsigned, p = a*b is 2N bits.
// Timing: combinational, no registers.
//
// The decomposition into four half-width multipliers, the accumulation and
// the column-method leaves follow the documented design; the level-by-level
// numbering is this implementation's own. N and PM_W must be powers of two
// with 2 <= PM_W <= N (checked at elaboration); with N == PM_W the module is
// a single column multiplier.
module vedic_modified_vm #(
  parameter int unsigned N    = 64,
  parameter int unsigned PM_W = 2
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned LEVELS = $clog2(N / PM_W);

  if (PM_W < 2 || PM_W > N || (N & (N-1)) != 0 || (PM_W & (PM_W-1)) != 0) begin : g_bad_params
    $error("vedic_modified_vm: N and PM_W must be powers of two, 2 <= PM_W <= N");
  end

  // Bit offset, within a, of the operand slice of leaf i.
  function automatic int unsigned leaf_a_offset(input int unsigned i);
    int unsigned off = 0;
    for (int unsigned m = 1; m <= LEVELS; m++)
      if (((i >> (2 * (m - 1))) & 2) != 0) off += PM_W << (m - 1);
    return off;
  endfunction

  // Bit offset, within b, of the operand slice of leaf i.
  function automatic int unsigned leaf_b_offset(input int unsigned i);
    int unsigned off = 0;
    for (int unsigned m = 1; m <= LEVELS; m++)
      if (((i >> (2 * (m - 1))) & 1) != 0) off += PM_W << (m - 1);
    return off;
  endfunction

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned W     = PM_W << l;             // operand width
    localparam int unsigned NODES = 1 << (2 * (LEVELS - l));

    logic [2*W-1:0] prod [NODES];

    if (l == 0) begin : g_leaves
      for (genvar i = 0; i < NODES; i++) begin : g_pm
        localparam int unsigned AO = leaf_a_offset(i);
        localparam int unsigned BO = leaf_b_offset(i);
        ut_pipelined_vm #(.N(PM_W)) u_pm (
          .a(a[AO +: PM_W]), .b(b[BO +: PM_W]), .p(prod[i])
        );
      end
    end else begin : g_nodes
      for (genvar j = 0; j < NODES; j++) begin : g_acc
        vedic_pp_accum #(.H(W / 2)) u_acc (
          .pp1(g_lvl[l-1].prod[4*j]),
          .pp2(g_lvl[l-1].prod[4*j+1]),
          .pp3(g_lvl[l-1].prod[4*j+2]),
          .pp4(g_lvl[l-1].prod[4*j+3]),
          .p  (prod[j])
        );
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0];
endmodule
