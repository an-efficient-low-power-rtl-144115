// Testbench of the multiplication sequencer. A model ring counter (a plain
// one-hot register advanced while run is high) supplies last, as the real
// ring counter does. Checks: load only while idle with start; run for exactly
// N cycles; done a one-cycle pulse right after; start while running ignored;
// back-to-back start in the done cycle.
module tb_bzfad_control;

  localparam int unsigned N = 32;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] ring;
  logic load, run, done;
  int checks = 0, failures = 0;
  int runs = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ring <= N'(1);
    else if (run) ring <= {ring[N-2:0], ring[N-1]};
  end

  bzfad_control dut (.clk(clk), .rst(rst), .start(start), .last(ring[N-1]),
                     .load(load), .run(run), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Called at a falling edge; start in this cycle.
  task automatic one_run(input bit poke);
    int n;
    start = 1'b1;
    #1 check(load, "load with start while idle");
    @(negedge clk);
    start = poke;
    check(run && !done, "running after start");
    #1 check(!load, "no load while running");
    n = 1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      check(run, "run until done");
      n++;
      @(negedge clk);
      if (n > 100) break;
    end
    check(n == int'(N), $sformatf("ran %0d cycles, expected %0d", n, N));
    check(!run, "idle with done");
    runs++;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(!run && !done && !load, "idle after reset");
    repeat (3) begin
      @(negedge clk);
      check(!run && !done, "stays idle without start");
    end
    one_run(1'b0);
    one_run(1'b1);          // back to back, with start held while busy
    @(negedge clk);
    check(!done && !run, "done lasts one cycle");
    repeat (2) @(negedge clk);
    one_run(1'b0);
    check(runs == 3, "three runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
