// Switching-activity comparison: the BZ-FAD multiplier and a conventional
// shift-and-add multiplier (conv_shift_add) run the same random 32-bit
// operand stream side by side. Both products are checked. During the
// multiplication cycles the testbench counts bit toggles of each design's
// registers and of its adder inputs, and the flip-flops that receive a clock
// edge each cycle:
//   * conventional: B, counter and 2N-bit partial product are clocked every
//     cycle; adder inputs are the partial-product upper half and the A/0
//     multiplexer output;
//   * BZ-FAD: Feeder, Bypass, hot_q, the lower-half bit being written and the
//     ring counter; the ring counter's flip-flops count as clocked only in the
//     blocks whose gated clock rose; adder inputs are Feeder and A.
// It checks that BZ-FAD makes fewer register toggles, fewer adder-input
// toggles and clocks fewer flip-flops, and prints the ratios.
module tb_activity_compare;

  localparam int unsigned N     = 32;
  localparam int unsigned BLOCK = 4;
  localparam int unsigned NOPS  = 400;

  logic           clk = 1'b0;
  logic           rst = 1'b0;
  logic           start = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic           busy, done, cdone;
  logic [2*N-1:0] product, cproduct;
  logic [N/BLOCK-1:0] hot_blocks;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bzfad_multiplier dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b),
    .busy(busy), .done(done), .product(product), .hot_blocks(hot_blocks)
  );
  conv_shift_add #(.N(N)) conv (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b),
    .done(cdone), .product(cproduct)
  );

  // Toggle counters.
  longint bz_reg = 0, bz_add = 0, bz_clk = 0;
  longint cv_reg = 0, cv_add = 0, cv_clk = 0;
  int     ring_edges = 0;

  for (genvar k = 0; k < N / BLOCK; k++) begin : g_edges
    always @(posedge dut.u_ring.g_blk[k].blk_clk) ring_edges++;
  end

  logic [N-1:0]   p_feeder, p_bypass, p_lo, p_ring, p_cb, p_cadd, p_add_bz;
  logic           p_hot;
  logic [$clog2(N)-1:0] p_cnt;
  logic [2*N-1:0] p_pp;
  int             p_edges;

  always @(negedge clk) begin
    if (!rst && busy) begin
      bz_reg += $countones(dut.feeder_q ^ p_feeder) + $countones(dut.bypass_q ^ p_bypass)
              + $countones(dut.lo_q ^ p_lo) + $countones(dut.ring ^ p_ring)
              + (dut.hot_q != p_hot);
      bz_add += $countones(dut.feeder_q ^ p_add_bz);
      // Clocked flip-flops at the last edge: Feeder or Bypass (N), hot_q,
      // one lower-half bit, and BLOCK flip-flops per ring block edge.
      bz_clk += N + 1 + 1 + BLOCK * (ring_edges - p_edges);
      cv_reg += $countones(conv.b_q ^ p_cb) + $countones(conv.cnt ^ p_cnt)
              + $countones(conv.pp ^ p_pp);
      cv_add += $countones(conv.pp[2*N-1:N] ^ p_pp[2*N-1:N]) + $countones(conv.addend ^ p_cadd);
      cv_clk += N + $clog2(N) + 2 * N;
    end
    p_feeder = dut.feeder_q; p_bypass = dut.bypass_q; p_lo = dut.lo_q;
    p_ring = dut.ring; p_hot = dut.hot_q; p_add_bz = dut.feeder_q;
    p_cb = conv.b_q; p_cnt = conv.cnt; p_pp = conv.pp; p_cadd = conv.addend;
    p_edges = ring_edges;
  end

  initial begin : watchdog
    repeat (NOPS * (N + 4) + 1000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    for (int k = 0; k < int'(NOPS); k++) begin
      a = $urandom(); b = $urandom();
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (!done) @(negedge clk);
      checks += 2;
      if (product !== 64'(a) * 64'(b) || !cdone) begin
        failures++;
        $display("FAIL: BZ-FAD %h * %h = %h", a, b, product);
      end
      if (cproduct !== 64'(a) * 64'(b)) begin
        failures++;
        $display("FAIL: conventional %h * %h = %h", a, b, cproduct);
      end
      @(negedge clk);
    end
    $display("register bit toggles: BZ-FAD %0d, conventional %0d (%0d%%)", bz_reg, cv_reg, bz_reg * 100 / cv_reg);
    $display("adder input toggles:  BZ-FAD %0d, conventional %0d (%0d%%)", bz_add, cv_add, bz_add * 100 / cv_add);
    $display("clocked flip-flops:   BZ-FAD %0d, conventional %0d (%0d%%)", bz_clk, cv_clk, bz_clk * 100 / cv_clk);
    checks += 3;
    if (!(bz_reg < cv_reg)) begin failures++; $display("FAIL: register toggles not reduced"); end
    if (!(bz_add < cv_add)) begin failures++; $display("FAIL: adder input toggles not reduced"); end
    if (!(bz_clk < cv_clk)) begin failures++; $display("FAIL: clocked flip-flops not reduced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
