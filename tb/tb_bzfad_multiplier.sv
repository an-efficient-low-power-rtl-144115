// End-to-end testbench of the BZ-FAD multiplier at its default size
// (32 x 32 bits, 4-bit ring-counter blocks).
//
// It multiplies corner-case and random operand pairs and compares every
// product with a 64-bit product computed here. For each multiplication it
// checks that done arrives exactly N rising edges after start was accepted
// (radix-2: one cycle per multiplier bit) and that busy is high throughout.
// It also watches the mechanisms the design relies on and counts how often
// each happened, failing if one never did:
//   * adder cycles (B(i) = 1) and bypass cycles (B(i) = 0), and in every
//     bypass cycle that the adder's Feeder input did not change;
//   * hand-over of the clock between two ring-counter blocks, with never
//     more than two blocks clocked and always at least one;
//   * ring-counter wrap from bit N-1 back to bit 0;
//   * a start accepted in the same cycle as done (back-to-back operation);
//   * a start while busy, which must be ignored.
module tb_bzfad_multiplier;

  localparam int unsigned N     = 32;
  localparam int unsigned BLOCK = 4;
  localparam int unsigned NRAND = 300;

  logic           clk = 1'b0;
  logic           rst = 1'b0;
  logic           start;
  logic [N-1:0]   a, b;
  logic           busy, done;
  logic [2*N-1:0] product;
  logic [N/BLOCK-1:0] hot_blocks;

  int checks = 0, failures = 0;
  int n_adder = 0, n_bypass = 0, n_handover = 0, n_wrap = 0;
  int n_back2back = 0, n_ignored = 0;
  longint unsigned cycle = 0;

  bzfad_multiplier dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b),
    .busy(busy), .done(done), .product(product), .hot_blocks(hot_blocks)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Mechanism monitors, sampled in the middle of each cycle.
  logic [N-1:0] feeder_prev;
  always @(negedge clk) begin
    if (!rst) begin
      check($countones(hot_blocks) inside {1, 2}, "one or two ring blocks clocked");
      if (busy) begin
        if (dut.hot_q) n_adder++;
        else begin
          n_bypass++;
          check(dut.feeder_q == feeder_prev, "adder input unchanged in a bypass cycle");
        end
        if ($countones(hot_blocks) == 2) n_handover++;
        if (dut.ring[N-1]) n_wrap++;
      end
      feeder_prev <= dut.feeder_q;
    end
  end

  // Run one multiplication; start is raised for one cycle at a falling edge.
  task automatic multiply(input logic [N-1:0] x, input logic [N-1:0] y,
                          input bit poke_while_busy);
    longint unsigned expected;
    longint unsigned t0;
    expected = longint'(x) * longint'(y);
    // Callers return at a falling edge; start in this cycle if done is high.
    if (done) n_back2back++;
    else @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    t0 = cycle;         // rising edges counted up to the one that took start
    start = 1'b0;
    a = $urandom(); b = $urandom();   // operands must have been captured
    check(busy, "busy after start");
    if (poke_while_busy) begin
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n_ignored++;
    end
    while (!done) begin
      @(negedge clk);
      if (!done) check(busy, "busy until done");
    end
    check(cycle - t0 == longint'(N), $sformatf("latency %0d cycles, expected %0d", cycle - t0, N));
    check(!busy, "not busy with done");
    check(product == expected,
          $sformatf("%0h * %0h = %0h, expected %0h", x, y, product, expected));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; a = '0; b = '0;
    #1 rst = 1'b1;  // a rising edge, so that the asynchronous resets fire
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (2) @(negedge clk);

    multiply('0, '0, 0);
    multiply('1, '1, 0);
    multiply('1, '0, 0);
    multiply('0, '1, 0);
    multiply(32'd1, 32'hDEAD_BEEF, 0);
    multiply(32'hDEAD_BEEF, 32'd1, 1);
    multiply(32'hAAAA_AAAA, 32'h5555_5555, 0);
    multiply(32'h8000_0000, 32'h8000_0000, 0);
    multiply(32'hFFFF_FFFF, 32'h0000_0001, 0);
    multiply(32'h1234_5678, 32'h8000_0001, 0);
    for (int k = 0; k < NRAND; k++) begin
      logic [N-1:0] x, y;
      x = $urandom(); y = $urandom();
      if (k % 7 == 0) y = y & $urandom() & $urandom();  // sparse multipliers
      multiply(x, y, k % 50 == 0);
      if (k % 3 == 0) repeat (k % 4 + 1) @(negedge clk);  // idle gaps
    end

    @(negedge clk);
    check(n_adder > 0,     "adder cycles happened");
    check(n_bypass > 0,    "bypass cycles happened");
    check(n_handover > 0,  "ring block hand-overs happened");
    check(n_wrap > 0,      "ring wrap happened");
    check(n_back2back > 0, "back-to-back start happened");
    check(n_ignored > 0,   "start while busy happened");
    $display("mechanisms: adder=%0d bypass=%0d handover=%0d wrap=%0d back2back=%0d ignored_start=%0d",
             n_adder, n_bypass, n_handover, n_wrap, n_back2back, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
