// Testbench of the ripple-carry adder: an 8-bit instance is checked for all
// 2^17 operand and carry combinations, a 32-bit instance on corner cases
// (carry through all bits) and random operands, against the + operator.
module tb_ripple_carry_adder;

  logic [7:0]  a8, b8;
  logic [8:0]  s8;
  logic [31:0] a32, b32;
  logic [32:0] s32;
  logic        cin;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8));
  ripple_carry_adder #(.N(32)) dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    a32 = x; b32 = y; cin = c;
    #1;
    checks++;
    if (s32 !== 33'(x) + 33'(y) + 33'(c)) begin
      failures++;
      $display("FAIL: %h + %h + %b = %h", x, y, c, s32);
    end
  endtask

  initial begin : watchdog
    #10000000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); cin = c[0];
          #1;
          checks++;
          if (s8 !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL: %0d + %0d + %0d = %0d", x, y, c, s8);
          end
        end
    check32('1, 32'd1, 1'b0);
    check32('1, '0, 1'b1);
    check32('1, '1, 1'b1);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int r = 0; r < 5000; r++) check32($urandom(), $urandom(), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
