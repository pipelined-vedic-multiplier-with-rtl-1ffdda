// tb_ut_pipelined_vm -- self-checking testbench for ut_pipelined_vm.
//
// Four column multipliers are built side by side: N = 2 (the default leaf),
// N = 4 and N = 8 are checked exhaustively against the '*' operator, and
// N = 32 (the widest leaf of any architecture) with random and corner
// operands. The 2x2 case of 11 * 11 = 1001 is also checked on its own,
// since it is the one leaf input that needs the carry between steps.
// The multiplier is combinational: operands change on a clock edge and the
// product is checked 1 time unit later. A watchdog ends the run after a
// fixed number of cycles.
module tb_ut_pipelined_vm;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;
  always @(posedge clk) cycles <= cycles + 1;

  logic [1:0]  a2,  b2;  logic [3:0]  p2;
  logic [3:0]  a4,  b4;  logic [7:0]  p4;
  logic [7:0]  a8,  b8;  logic [15:0] p8;
  logic [31:0] a32, b32; logic [63:0] p32;

  ut_pipelined_vm #(.N(2))  dut2  (.a(a2),  .b(b2),  .p(p2));
  ut_pipelined_vm #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  ut_pipelined_vm #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  ut_pipelined_vm #(.N(32)) dut32 (.a(a32), .b(b32), .p(p32));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    a2 = '0; b2 = '0; a4 = '0; b4 = '0; a8 = '0; b8 = '0; a32 = '0; b32 = '0;
    // The worked example: 11 * 11 = 1001.
    @(posedge clk); a2 = 2'b11; b2 = 2'b11; #1;
    check("2x2 11*11", 64'(p2), 64'b1001);
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        @(posedge clk);
        a8 = 8'(x); b8 = 8'(y);
        a4 = 4'(x); b4 = 4'(y);
        a2 = 2'(x); b2 = 2'(y);
        a32 = (x < 16) ? {32{1'b1}} - 32'(x) : $urandom;
        b32 = (y < 16) ? {32{1'b1}} - 32'(y) : $urandom;
        #1;
        check("8x8", 64'(p8), 64'(x * y));
        if (x < 16 && y < 16) check("4x4", 64'(p4), 64'(x * y));
        if (x < 4  && y < 4)  check("2x2", 64'(p2), 64'(x * y));
        check("32x32", p32, 64'(a32) * 64'(b32));
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
