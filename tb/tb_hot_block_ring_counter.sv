// Testbench of the hot-block ring counter.
//
// Runs the ring-counter sizes the published power comparison covers (16, 32,
// 48 and 64 bits with 4-bit blocks) plus other block sizes (2, 8 and 16) side
// by side, each in a ring_check that compares it cycle by cycle with a plain
// ring register, checks which blocks are clocked and how many block clock
// edges occur per cycle, under a random enable. A second reset in the middle
// checks that the counter returns to bit 0 and block 0.
module tb_hot_block_ring_counter;

  localparam int NINST = 7;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic run = 1'b0;
  int c [NINST], f [NINST], h [NINST], w [NINST];
  int checks, failures;
  int tb_checks = 0, tb_failures = 0;   // checks made here, beside the instances'

  always #5 clk = ~clk;

  ring_check #(.WIDTH(32), .BLOCK(4))  i0 (.clk(clk), .rst(rst), .run(run), .checks(c[0]), .failures(f[0]), .handovers(h[0]), .wraps(w[0]));
  ring_check #(.WIDTH(16), .BLOCK(4))  i1 (.clk(clk), .rst(rst), .run(run), .checks(c[1]), .failures(f[1]), .handovers(h[1]), .wraps(w[1]));
  ring_check #(.WIDTH(48), .BLOCK(4))  i2 (.clk(clk), .rst(rst), .run(run), .checks(c[2]), .failures(f[2]), .handovers(h[2]), .wraps(w[2]));
  ring_check #(.WIDTH(64), .BLOCK(4))  i3 (.clk(clk), .rst(rst), .run(run), .checks(c[3]), .failures(f[3]), .handovers(h[3]), .wraps(w[3]));
  ring_check #(.WIDTH(16), .BLOCK(2))  i4 (.clk(clk), .rst(rst), .run(run), .checks(c[4]), .failures(f[4]), .handovers(h[4]), .wraps(w[4]));
  ring_check #(.WIDTH(64), .BLOCK(8))  i5 (.clk(clk), .rst(rst), .run(run), .checks(c[5]), .failures(f[5]), .handovers(h[5]), .wraps(w[5]));
  ring_check #(.WIDTH(32), .BLOCK(16)) i6 (.clk(clk), .rst(rst), .run(run), .checks(c[6]), .failures(f[6]), .handovers(h[6]), .wraps(w[6]));

  task automatic report();
    checks = tb_checks; failures = tb_failures;
    for (int k = 0; k < NINST; k++) begin
      checks   += c[k];
      failures += f[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run = 1'b1;
    repeat (600) @(negedge clk);
    run = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b1;
    #2;
    tb_checks++;
    if (i0.ring != 32'h1 || i3.ring != 64'h1 || i0.active != 8'h1) begin
      $display("FAIL: second reset did not return to bit 0");
      tb_failures++;
    end
    @(negedge clk) rst = 1'b0;
    run = 1'b1;
    repeat (200) @(negedge clk);
    run = 1'b0;
    @(negedge clk);
    for (int k = 0; k < NINST; k++) begin
      tb_checks += 2;
      if (h[k] == 0) begin tb_failures++; $display("FAIL: instance %0d never handed over", k); end
      if (w[k] == 0) begin tb_failures++; $display("FAIL: instance %0d never wrapped", k); end
    end
    report();
    $finish;
  end

endmodule
