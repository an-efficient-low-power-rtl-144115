// Testbench of the hot-block clock gator.
//
// Drives Entrance and Exit the way the neighbouring ring-counter flip-flops
// would (changing just after a rising clock edge) and checks:
//   * after reset the gator is off (clk_out held at 1), or on for
//     RESET_VALUE = 1 (second instance);
//   * Entrance = 1 turns it on without an extra rising edge in that cycle,
//     and from the next cycle clk_out follows clk;
//   * it stays on while Entrance and Exit are 0 (the 1 inside the block);
//   * Exit = 1 turns it off after the rising edge of that cycle, again
//     without a glitch;
//   * the number of rising edges on clk_out per visit equals the number of
//     cycles the 1 spends in the block plus the edge that moves it out.
module tb_hot_block_cg;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic entrance = 1'b0, exit_i = 1'b0;
  logic active0, clk_out0, active1, clk_out1;
  int checks = 0, failures = 0;
  int edges0 = 0;

  always #5 clk = ~clk;

  hot_block_cg #(.RESET_VALUE(1'b0)) dut0 (
    .rst(rst), .clk_n(~clk), .entrance(entrance), .exit_i(exit_i),
    .active(active0), .clk_out(clk_out0)
  );
  hot_block_cg #(.RESET_VALUE(1'b1)) dut1 (
    .rst(rst), .clk_n(~clk), .entrance(1'b0), .exit_i(exit_i),
    .active(active1), .clk_out(clk_out1)
  );

  always @(posedge clk_out0) edges0++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Sample clk_out in both clock phases: off -> always 1; on -> equals clk.
  task automatic expect_state(input bit on, input string what);
    @(negedge clk); #1;
    check(active0 == on, {what, ": active"});
    check(clk_out0 == (on ? 1'b0 : 1'b1), {what, ": clk_out in low phase"});
    @(posedge clk); #1;
    check(clk_out0 == 1'b1, {what, ": clk_out in high phase"});
  endtask

  // One visit of the 1: Entrance for one cycle, STAY cycles inside, then Exit.
  task automatic visit(input int stay);
    int e0;
    @(posedge clk); #1 entrance = 1'b1;
    e0 = edges0;
    @(negedge clk); #1;
    check(active0, "on once Entrance is 1");
    check(edges0 == e0, "no rising edge in the Entrance cycle");
    @(posedge clk); #1 entrance = 1'b0;       // the 1 moves into the block
    for (int k = 0; k < stay - 1; k++) expect_state(1'b1, "inside");
    @(posedge clk); #1 exit_i = 1'b1;          // the 1 left to the next block
    @(negedge clk); #1;
    check(!active0, "off once Exit is 1");
    check(clk_out0 == 1'b1, "clk_out parked at 1");
    @(posedge clk); #1 exit_i = 1'b0;
    expect_state(1'b0, "after exit");
    check(edges0 - e0 == stay + 1, $sformatf("%0d rising edges for a stay of %0d", edges0 - e0, stay));
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(!active0 && clk_out0, "reset to off");
    check(active1, "RESET_VALUE 1 resets to on");
    #2 rst = 1'b0;
    repeat (3) expect_state(1'b0, "idle after reset");
    check(active1, "reset-on gator stays on without Exit");
    visit(4);
    repeat (2) expect_state(1'b0, "idle");
    visit(2);
    visit(8);
    // The reset-on gator turns off on Exit.
    @(posedge clk); #1 exit_i = 1'b1;
    @(negedge clk); #1 check(!active1 && clk_out1, "reset-on gator off after Exit");
    @(posedge clk); #1 exit_i = 1'b0;
    // Reset while on.
    @(posedge clk); #1 entrance = 1'b1;
    @(posedge clk); #1 entrance = 1'b0;
    #1 rst = 1'b1;
    #1 check(!active0, "reset turns the gator off");
    #1 rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
