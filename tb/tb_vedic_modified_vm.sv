// tb_vedic_modified_vm -- self-checking testbench for vedic_modified_vm.
//
// Small multipliers are checked exhaustively against '*': 8x8 built from
// 2x2 leaves (three levels of accumulation), from 4x4 leaves (one level)
// and as a single 8x8 column multiplier (no accumulation). Wider ones are
// checked with random and corner operands: 16x16 from 2x2 leaves and 32x32
// from 4x4 leaves. The multiplier is combinational; the product is checked
// 1 time unit after the operands change on a clock edge. A watchdog ends the
// run after a fixed number of cycles.
module tb_vedic_modified_vm;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  logic [7:0]  a8, b8;
  logic [15:0] p8_2, p8_4, p8_8;
  logic [15:0] a16, b16; logic [31:0] p16;
  logic [31:0] a32, b32; logic [63:0] p32;

  vedic_modified_vm #(.N(8),  .PM_W(2)) dut8_2  (.a(a8),  .b(b8),  .p(p8_2));
  vedic_modified_vm #(.N(8),  .PM_W(4)) dut8_4  (.a(a8),  .b(b8),  .p(p8_4));
  vedic_modified_vm #(.N(8),  .PM_W(8)) dut8_8  (.a(a8),  .b(b8),  .p(p8_8));
  vedic_modified_vm #(.N(16), .PM_W(2)) dut16_2 (.a(a16), .b(b16), .p(p16));
  vedic_modified_vm #(.N(32), .PM_W(4)) dut32_4 (.a(a32), .b(b32), .p(p32));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0; a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        @(posedge clk);
        a8  = 8'(x); b8 = 8'(y);
        a16 = (x < 8) ? 16'hffff - 16'(x) : 16'($urandom);
        b16 = (y < 8) ? 16'hffff - 16'(y) : 16'($urandom);
        a32 = (x < 8) ? 32'hffff_ffff - 32'(x) : $urandom;
        b32 = (y < 8) ? 32'hffff_ffff - 32'(y) : $urandom;
        #1;
        check("8x8 from 2x2", 64'(p8_2), 64'(x * y));
        check("8x8 from 4x4", 64'(p8_4), 64'(x * y));
        check("8x8 single",   64'(p8_8), 64'(x * y));
        check("16x16 from 2x2", 64'(p16), 64'(a16) * 64'(b16));
        check("32x32 from 4x4", p32, 64'(a32) * 64'(b32));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    wait (cycles >= 70000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
