// Hot-block clock gator: the clock gating cell of one block of the hot-block
// ring counter.
//
// How it works: a resettable level-sensitive latch stores whether the single
// "1" of the ring counter is in (or about to enter) this block. The latch
// data input is the Entrance signal. Its gate input comes from a watchdog
// multiplexer M1 that is steered by the latch output itself:
//   * latch = 0: M1 watches Entrance. When Entrance rises (the 1 sits in the
//     last flip-flop of the block to the right and enters this block at the
//     next edge), the latch opens and captures 1.
//   * latch = 1: M1 watches Exit. When Exit rises (the 1 has moved into the
//     first flip-flop of the block to the left), the latch opens and captures
//     Entrance, which is 0 by then.
// The gated clock is NAND(latch, clk_n), where clk_n is the inverted clock, so
// clk_out follows clk while the latch holds 1 and sits at 1 otherwise.
//
// Timing: Entrance and Exit are flip-flop outputs that change just after a
// rising clock edge, while clk_n is 0. The NAND output is then forced to 1 by
// clk_n whatever the latch does, so turning the block on or off never makes a
// glitch, and the first rising edge appears one full cycle after Entrance
// rose, which is the edge that moves the 1 into the block.
//
// Interface: rst (active high, asynchronous) forces the latch to RESET_VALUE.
// The cell structure (latch, M1, NAND with inverted clock, four inputs)
// follows the published gator. RESET_VALUE is this design's addition: the
// block that holds the 1 after reset must start enabled, so its gator is
// reset to 1 and all others to 0.
//
// The latch (and its loop through M1, which is the latch's own feedback, not a
// combinational loop through logic) is intentional: it is the storage element
// of the gator.
module hot_block_cg #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic rst,       // active-high reset of the latch
  input  logic clk_n,     // inverted clock (gated off externally when the counter is disabled)
  input  logic entrance,  // input of the right-most flip-flop of this block
  input  logic exit_i,    // output of the right-most flip-flop of the left-hand block
  output logic active,    // latch output: this block is the hot block
  output logic clk_out    // gated clock to the flip-flops of this block
);

  logic latch_q;
  logic gate;

  // Watchdog multiplexer M1.
  assign gate = latch_q ? exit_i : entrance;

  // Resettable latch, data = Entrance, gate = M1 output.
  always_latch begin
    if (rst) begin
      latch_q = RESET_VALUE;
    end else if (gate) begin
      latch_q = entrance;
    end
  end

  assign active  = latch_q;
  assign clk_out = ~(latch_q & clk_n);

endmodule
