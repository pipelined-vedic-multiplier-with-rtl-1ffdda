// tb_vedic_pp_accum -- self-checking testbench for vedic_pp_accum.
//
// The accumulator is driven with the partial products of real operand
// pairs, worked out here with '*' on the operand halves, and its output is
// compared with the full product. H = 2 (the 4x4 case) runs over all
// operand pairs; H = 16 (the top node of a 64x64 multiplier) runs random
// and all-ones operands. The testbench also counts how often the carry out
// of the lower middle adder is 1 and 2 and how often the upper middle adder
// carries into the top field, and fails if any of these never happened.
module tb_vedic_pp_accum;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_c1_one = 0, n_c1_two = 0, n_c2 = 0;
  always @(posedge clk) cycles <= cycles + 1;

  logic [3:0]  q1, q2, q3, q4;  logic [7:0]   qp;
  logic [31:0] r1, r2, r3, r4;  logic [63:0]  rp;

  vedic_pp_accum #(.H(2))  dut_h2  (.pp1(q1), .pp2(q2), .pp3(q3), .pp4(q4), .p(qp));
  vedic_pp_accum #(.H(16)) dut_h16 (.pp1(r1), .pp2(r2), .pp3(r3), .pp4(r4), .p(rp));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Carry out of the lower middle adder, worked out independently.
  function automatic int carry1(input logic [63:0] pp1, pp2, pp3, input int h);
    logic [63:0] mask = (64'd1 << h) - 1;
    return int'((((pp1 >> h) & mask) + (pp2 & mask) + (pp3 & mask)) >> h);
  endfunction

  initial begin
    logic [15:0] a, b;
    {q1, q2, q3, q4, r1, r2, r3, r4} = '0;
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        @(posedge clk);
        q1 = 4'((x % 4) * (y % 4));
        q2 = 4'((x % 4) * (y / 4));
        q3 = 4'((x / 4) * (y % 4));
        q4 = 4'((x / 4) * (y / 4));
        #1;
        check("H=2", 64'(qp), 64'(x * y));
      end
    end
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] a64, b64, mask, s2;
      int c1;
      @(posedge clk);
      a64 = (i < 4) ? {64{1'b1}} : {$urandom, $urandom};
      b64 = (i < 2) ? {64{1'b1}} : {$urandom, $urandom};
      r1 = a64[15:0]  * b64[15:0];
      r2 = a64[15:0]  * b64[31:16];
      r3 = a64[31:16] * b64[15:0];
      r4 = a64[31:16] * b64[31:16];
      #1;
      check("H=16", rp, 64'(a64[31:0]) * 64'(b64[31:0]));
      c1 = carry1(64'(r1), 64'(r2), 64'(r3), 16);
      if (c1 == 1) n_c1_one++;
      if (c1 == 2) n_c1_two++;
      mask = 64'hffff;
      s2 = (64'(r4) & mask) + ((64'(r2) >> 16) & mask) + ((64'(r3) >> 16) & mask) + 64'(c1);
      if ((s2 >> 16) != 0) n_c2++;
    end
    $display("carry events: lower adder carry=1 %0d, carry=2 %0d, upper adder carry %0d",
             n_c1_one, n_c1_two, n_c2);
    checks++; if (n_c1_one == 0) begin failures++; $display("FAIL no carry of 1 seen"); end
    checks++; if (n_c1_two == 0) begin failures++; $display("FAIL no carry of 2 seen"); end
    checks++; if (n_c2 == 0)     begin failures++; $display("FAIL no upper carry seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    wait (cycles >= 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
