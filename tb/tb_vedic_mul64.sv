// tb_vedic_mul64 -- end-to-end testbench for the 64x64 Vedic multiplier at
// its default configuration (64-bit operands, 2x2 pipelined leaves).
//
// Operands are corner values (zero, one, all ones, alternating patterns,
// single bits) followed by random ones; each product is compared with the
// 128-bit '*' of the testbench. Besides the products it counts, from the
// operands alone, how often each mechanism of the design is exercised and
// fails if one never is:
//   - a 2x2 leaf needing the carry between its steps (digits 11 * 11);
//   - at the 64-bit node, a carry of 1 and a carry of 2 out of the lower
//     middle adder into the upper middle field;
//   - at the 64-bit node, a carry out of the upper middle adder into the top
//     field.
// The multiplier is combinational: the product is checked 1 time unit after
// the operands change on a clock edge. A watchdog ends the run after a fixed
// number of cycles.
module tb_vedic_mul64;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_leaf_carry = 0, n_c1_one = 0, n_c1_two = 0, n_c2 = 0;
  always @(posedge clk) cycles <= cycles + 1;

  localparam int NUM_RANDOM = 20000;

  logic [63:0]  a, b;
  logic [127:0] p;

  vedic_mul64 dut (.a(a), .b(b), .p(p));

  function automatic logic [63:0] corner(input int i);
    case (i % 8)
      0: return 64'd0;
      1: return 64'd1;
      2: return {64{1'b1}};
      3: return {32{2'b10}};
      4: return {32{2'b01}};
      5: return 64'd1 << (i % 64);
      6: return {64{1'b1}} >> (i % 64);
      default: return 64'hffff_ffff_0000_0000;
    endcase
  endfunction

  // True if some 2-bit digit of x and some 2-bit digit of y are both 11,
  // i.e. some 2x2 leaf multiplies 11 by 11 and must carry between steps.
  function automatic bit leaf_carry(input logic [63:0] x, input logic [63:0] y);
    bit xa = 0, ya = 0;
    for (int d = 0; d < 32; d++) begin
      if (x[2*d +: 2] == 2'b11) xa = 1;
      if (y[2*d +: 2] == 2'b11) ya = 1;
    end
    return xa && ya;
  endfunction

  task automatic apply(input logic [63:0] x, input logic [63:0] y);
    logic [63:0]  pp1, pp2, pp3, pp4;
    logic [33:0]  s1, s2;
    logic [127:0] exp;
    @(posedge clk);
    a = x; b = y;
    #1;
    exp = 128'(x) * 128'(y);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %h * %h: got %h expected %h", x, y, p, exp);
    end
    // Mechanism counts, from the operands only.
    pp1 = 64'(x[31:0])  * 64'(y[31:0]);
    pp2 = 64'(x[31:0])  * 64'(y[63:32]);
    pp3 = 64'(x[63:32]) * 64'(y[31:0]);
    pp4 = 64'(x[63:32]) * 64'(y[63:32]);
    s1 = 34'(pp1[63:32]) + 34'(pp2[31:0]) + 34'(pp3[31:0]);
    s2 = 34'(pp4[31:0]) + 34'(pp2[63:32]) + 34'(pp3[63:32]) + 34'(s1[33:32]);
    if (s1[33:32] == 2'd1) n_c1_one++;
    if (s1[33:32] == 2'd2) n_c1_two++;
    if (s2[33:32] != 2'd0) n_c2++;
    if (leaf_carry(x, y))  n_leaf_carry++;
  endtask

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 8; j++)
        apply(corner(i), corner(i + j));
    for (int i = 0; i < NUM_RANDOM; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("mechanisms: leaf step carry %0d, lower adder carry=1 %0d, carry=2 %0d, upper adder carry %0d",
             n_leaf_carry, n_c1_one, n_c1_two, n_c2);
    checks++; if (n_leaf_carry == 0) begin failures++; $display("FAIL no leaf carry seen"); end
    checks++; if (n_c1_one == 0)     begin failures++; $display("FAIL no carry of 1 seen"); end
    checks++; if (n_c1_two == 0)     begin failures++; $display("FAIL no carry of 2 seen"); end
    checks++; if (n_c2 == 0)         begin failures++; $display("FAIL no upper carry seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    wait (cycles >= NUM_RANDOM + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
