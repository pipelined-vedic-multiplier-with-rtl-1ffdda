// tb_vedic_architectures -- the five 64x64 architectures side by side.
//
// vedic_mul64 is built five times, with pipelined (column-method) leaves of
// 32x32, 16x16, 8x8, 4x4 and 2x2 bits, i.e. with 4, 16, 64, 256 and 1024
// leaf multipliers. All five get the same corner and random operands and
// each product is compared with the 128-bit '*' of the testbench. The
// multipliers are combinational; products are checked 1 time unit after the
// operands change on a clock edge. A watchdog ends the run after a fixed
// number of cycles.
module tb_vedic_architectures;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  localparam int NUM_RANDOM = 5000;
  localparam int NUM_ARCH   = 5;

  logic [63:0]  a, b;
  logic [127:0] p [NUM_ARCH];

  vedic_mul64 #(.PM_W(32)) arch_a (.a(a), .b(b), .p(p[0]));
  vedic_mul64 #(.PM_W(16)) arch_b (.a(a), .b(b), .p(p[1]));
  vedic_mul64 #(.PM_W(8))  arch_c (.a(a), .b(b), .p(p[2]));
  vedic_mul64 #(.PM_W(4))  arch_d (.a(a), .b(b), .p(p[3]));
  vedic_mul64 #(.PM_W(2))  arch_e (.a(a), .b(b), .p(p[4]));

  task automatic apply(input logic [63:0] x, input logic [63:0] y);
    logic [127:0] exp;
    @(posedge clk);
    a = x; b = y;
    #1;
    exp = 128'(x) * 128'(y);
    for (int k = 0; k < NUM_ARCH; k++) begin
      checks++;
      if (p[k] !== exp) begin
        failures++;
        if (failures <= 10)
          $display("FAIL architecture %0d: %h * %h gave %h, expected %h", k, x, y, p[k], exp);
      end
    end
  endtask

  initial begin
    a = '0; b = '0;
    apply('0, '0);
    apply({64{1'b1}}, {64{1'b1}});
    apply({64{1'b1}}, 64'd1);
    apply({32{2'b10}}, {32{2'b11}});
    for (int i = 0; i < NUM_RANDOM; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    wait (cycles >= NUM_RANDOM + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
