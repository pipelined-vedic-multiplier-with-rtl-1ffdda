// ut_pipelined_vm -- N x N unsigned "pipelined" Vedic multiplier.
//
// The multiplier follows the Urdhava Tiryakbhyam (vertical and crosswise)
// rule directly, without splitting the operands into smaller multipliers.
// Step k (k = 0 .. 2N-2) forms the column sum of every bit product
// a[i]&b[j] with i+j == k: the first and last steps are the vertical
// products a[0]b[0] and a[N-1]b[N-1], every step between them is a
// crosswise sum. The column sums are then concatenated from the least
// significant step upwards: each step adds the carry of the step below,
// keeps the low bit as product bit k and hands the rest on as carry. The
// carry left after the last step is product bit 2N-1.
//
// Interface: a, b are N-bit unsigned operands, p = a*b is 2N bits.
// Timing: purely combinational. "Pipelined" names the column-by-column
// UT method, as in the design this follows; no register stage is described
// for it, so none is added.
//
// The step structure is the documented one; the column sums as plain
// population counts and the carry chain between columns are this design's
// own realisation of "concatenation with carries".
module ut_pipelined_vm #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // A column sum is at most N and the carry into a column at most N, so
  // CW bits hold column + carry (<= 2N) without loss.
  localparam int unsigned CW = $clog2(2*N + 1);

  // Each step k forms its column sum, adds the carry of step k-1, keeps
  // the low bit as p[k] and passes the rest on as the carry of step k.
  always_comb begin
    logic [CW-1:0] col;
    logic [CW-1:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2*N-1; k++) begin
      col = carry;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N)
          col = col + CW'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*N-1] = carry[0];
  end
endmodule
