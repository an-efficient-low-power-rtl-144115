// Hot-block ring counter: a one-hot ring counter whose flip-flops are split
// into blocks of BLOCK bits, each block clocked through its own clock gator
// (hot_block_cg).
//
// How it works: the single 1 moves one position towards the MSB on every
// enabled clock edge and wraps from bit WIDTH-1 to bit 0. Only the block that
// holds the 1 (the hot block) receives clock edges, plus, for one cycle, the
// block it is about to enter. All other flip-flops see a constant clock. Block
// k's gator watches
//   Entrance = ring[k*BLOCK-1]      (input of the block's first flip-flop)
//   Exit     = ring[(k+1)*BLOCK]    (first flip-flop of the next block)
// with indices taken modulo WIDTH, as in the published 16-bit example.
//
// Interface and timing: rising-edge clk. ring is the one-hot state; after the
// asynchronous, active-high rst it is 1 in bit 0. en stops the counter by
// gating the inverted clock fed to every gator (clk_n = ~clk & en), so en must
// only change while clk is high, i.e. it must come from a rising-edge
// register of the clk domain; the ring then advances exactly on the rising
// edges that end a cycle in which en was 1. active shows which gators are
// passing the clock (one bit per block).
//
// From the published design: the block partitioning, the gator and its
// Entrance/Exit wiring, inverted clock into the gators, block size 4 (the
// size with the largest power saving). This design's own choices: the en
// input, the gator of block 0 being reset to the on state, and the
// requirement of at least two blocks (with a single block, Exit would be the
// block's own first flip-flop and the block would switch itself off).
module hot_block_ring_counter #(
  parameter int unsigned WIDTH = 32,  // ring length (= multiplier width)
  parameter int unsigned BLOCK = 4    // flip-flops per clock-gated block
) (
  input  logic                      clk,
  input  logic                      rst,     // asynchronous, active high
  input  logic                      en,      // advance on the next rising edge
  output logic [WIDTH-1:0]          ring,    // one-hot counter state
  output logic [WIDTH/BLOCK-1:0]    active   // gator state per block
);

  localparam int unsigned NBLK = WIDTH / BLOCK;

  // Inverted clock for all gators; gated low while the counter is disabled.
  logic clk_n;
  assign clk_n = ~clk & en;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO  = k * BLOCK;
    localparam int unsigned ENT = (LO + WIDTH - 1) % WIDTH;
    localparam int unsigned EXT = (LO + BLOCK) % WIDTH;

    logic             blk_clk;
    logic [BLOCK-1:0] q;
    logic [BLOCK-1:0] d;

    hot_block_cg #(
      .RESET_VALUE(k == 0)
    ) u_cg (
      .rst     (rst),
      .clk_n   (clk_n),
      .entrance(ring[ENT]),
      .exit_i  (ring[EXT]),
      .active  (active[k]),
      .clk_out (blk_clk)
    );

    // Shift path: each flip-flop takes its right-hand neighbour.
    assign d = {q[BLOCK-2:0], ring[ENT]};

    always_ff @(posedge blk_clk or posedge rst) begin
      if (rst) begin
        q <= (k == 0) ? BLOCK'(1) : '0;
      end else begin
        q <= d;
      end
    end

    assign ring[LO +: BLOCK] = q;
  end

  // Exactly one bit is 1 at every clock edge (reset makes it so).
  always @(posedge clk) begin
    a_one_hot: assert ($onehot(ring))
      else $error("hot_block_ring_counter: ring %h is not one-hot", ring);
  end

  initial begin
    assert (BLOCK >= 2 && WIDTH % BLOCK == 0 && WIDTH / BLOCK >= 2)
      else $error("hot_block_ring_counter: need BLOCK >= 2, WIDTH a multiple of BLOCK, two or more blocks");
  end

endmodule
