// Checker used by the ring-counter testbench: one hot-block ring counter of a
// given size next to a plain reference ring register.
//
// en is driven randomly (changing just after rising edges, as a clk-domain
// register would). Every cycle the checker compares the counter with the
// reference, checks that exactly the expected blocks are clocked (the block
// holding the 1, plus the next block when the 1 sits in the last flip-flop of
// its block) and counts rising edges of every block clock: at most two blocks
// may see an edge per enabled cycle and none when disabled. It counts block
// hand-overs and ring wraps so the testbench can check they happened.
module ring_check #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned BLOCK = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic run,          // let the checker drive random en
  output int   checks,
  output int   failures,
  output int   handovers,
  output int   wraps
);

  localparam int unsigned NBLK = WIDTH / BLOCK;

  logic             en;
  logic [WIDTH-1:0] ring, ref_ring;
  logic [NBLK-1:0]  active, exp_active;
  int               blk_edges [NBLK];

  hot_block_ring_counter #(.WIDTH(WIDTH), .BLOCK(BLOCK)) dut (
    .clk(clk), .rst(rst), .en(en), .ring(ring), .active(active)
  );

  for (genvar k = 0; k < NBLK; k++) begin : g_cnt
    always @(posedge dut.g_blk[k].blk_clk) blk_edges[k]++;
  end

  initial begin
    checks = 0; failures = 0; handovers = 0; wraps = 0; en = 1'b0;
    foreach (blk_edges[k]) blk_edges[k] = 0;
  end

  always @(posedge clk or posedge rst) begin
    if (rst) ref_ring <= WIDTH'(1);
    else if (en) ref_ring <= {ref_ring[WIDTH-2:0], ref_ring[WIDTH-1]};
  end

  // New en just after each rising edge: mostly enabled.
  always @(posedge clk) begin
    #1 en <= run && ($urandom_range(0, 9) != 0);
  end

  always_comb begin
    exp_active = '0;
    for (int k = 0; k < int'(NBLK); k++) begin
      if (|ring[k*BLOCK +: BLOCK]) exp_active[k] = 1'b1;
      if (ring[k*BLOCK + BLOCK - 1]) exp_active[(k + 1) % NBLK] = 1'b1;
    end
  end

  int   edges_before;
  logic en_before;
  always @(negedge clk) begin
    if (!rst && run) begin
      int total;
      total = 0;
      foreach (blk_edges[k]) total += blk_edges[k];
      checks += 3;
      if (ring != ref_ring) begin
        failures++;
        $display("FAIL %0dx%0d: ring %h, expected %h", WIDTH, BLOCK, ring, ref_ring);
      end
      if (active != exp_active) begin
        failures++;
        $display("FAIL %0dx%0d: active blocks %b, expected %b", WIDTH, BLOCK, active, exp_active);
      end
      if (total - edges_before > (en_before ? 2 : 0)) begin
        failures++;
        $display("FAIL %0dx%0d: %0d block clock edges in one cycle", WIDTH, BLOCK, total - edges_before);
      end
      if ($countones(active) == 2) handovers++;
      if (ring[WIDTH-1] && en) wraps++;
      edges_before = total;
      en_before    = en;
    end else begin
      int total;
      total = 0;
      foreach (blk_edges[k]) total += blk_edges[k];
      edges_before = total;
      en_before    = en;
    end
  end

endmodule
