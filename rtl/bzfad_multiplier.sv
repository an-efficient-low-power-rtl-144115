// BZ-FAD multiplier: a radix-2 shift-and-add multiplier that bypasses the
// adder when the multiplier bit is zero and feeds A to the adder directly.
//
// A conventional shift-and-add multiplier shifts B to bring each bit to a
// select line, shifts the whole partial product every cycle, counts cycles in
// a binary counter and pushes either A or 0 through its adder. This datapath
// removes those sources of switching:
//   * B is never shifted. A ring counter (hot_block_ring_counter) holds a
//     single 1 at position i in cycle i, and one-hot multiplexers pick B(i).
//   * The high half of the partial product lives in one of two registers.
//     Feeder is the adder's input; Bypass holds the partial product in
//     cycles where the adder is not needed. During cycle i the datapath looks
//     at B(i+1): if it is 1 the new partial product is written to Feeder,
//     otherwise to Bypass. Hence when B(i) = 0, Feeder does not change, the
//     adder inputs do not change and the adder makes no transitions.
//   * A goes straight into the adder (no A/0 multiplexer); the result
//     multiplexer, steered by B(i) (register hot_q), takes either the adder
//     output Feeder + A or the Bypass register.
//   * The right shift of the partial product is pure wiring: bits N..1 of
//     the result are the new high half; bit 0 is final and is written into
//     bit i of the lower product half (product_lo_reg), selected by ring
//     counter bit i, so the lower half never shifts.
//   * The ring counter also marks the last cycle (bit N-1 hot), so there is no
//     binary counter.
//
// Interface and timing: rising-edge clk, asynchronous active-high rst. While
// idle, start = 1 at a rising edge loads a and b (unsigned) and clears the
// partial product. N cycles follow, one per bit of b. done pulses for one
// cycle N rising edges after the edge that accepted start; from then on
// product = a * b (2N bits) is held until the next start. busy is high during
// the N cycles. hot_blocks shows which ring-counter blocks currently receive
// clock edges (observation only). A new start can be given in the cycle in which done is high.
//
// From the published design: the Feeder/Bypass bypass scheme, the direct feed
// of A, the unshifted lower half, the ring-counter selection of B(i), the
// ripple-carry adder and the hot-block ring counter with 4-bit blocks; the
// default width of 32 bits is the width of the published headline results.
// This design's own choices: Feeder and Bypass are written through clock
// enables (a synthesis tool maps them to integrated clock gates) instead of
// hand-built NAND/NOR gated clocks; B(i+1) is selected by a one-hot
// multiplexer driven by the ring counter rotated by one place and registered
// as B(i) for the next cycle; at start the empty partial product is written
// only to the register that B(0) selects; the final high half is written
// into Bypass in the last cycle; the start/busy/done handshake.
module bzfad_multiplier
  import bzfad_pkg::*;
#(
  parameter int unsigned N     = 32,  // operand width
  parameter int unsigned BLOCK = 4    // ring-counter block size
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   a,        // multiplicand
  input  logic [N-1:0]   b,        // multiplier
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product,
  output logic [N/BLOCK-1:0] hot_blocks  // ring-counter blocks receiving clock edges
);

  // ---------------------------------------------------------------- control
  logic load, run, last;
  logic [N-1:0]       ring;

  assign last = ring[N-1];

  bzfad_control u_ctrl (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .last (last),
    .load (load),
    .run  (run),
    .done (done)
  );

  assign busy = run;

  hot_block_ring_counter #(
    .WIDTH(N),
    .BLOCK(BLOCK)
  ) u_ring (
    .clk   (clk),
    .rst   (rst),
    .en    (run),
    .ring  (ring),
    .active(hot_blocks)
  );

  // ---------------------------------------------------------------- datapath
  logic [N-1:0] a_q, b_q;       // operands, constant during a multiplication
  logic [N-1:0] feeder_q;       // partial product feeding the adder
  logic [N-1:0] bypass_q;       // partial product when the adder is bypassed
  logic         hot_q;          // B(i) of the current cycle
  logic         next_hot;       // B(i+1)
  logic [N:0]   sum;            // feeder + A
  logic [N:0]   result;         // partial product before the (wired) shift
  logic [N-1:0] lo_q;

  // B(i+1): the ring counter rotated by one place selects the next bit.
  onehot_mux #(.N(N)) u_bsel (
    .data(b_q),
    .sel ({ring[N-2:0], ring[N-1]}),
    .y   (next_hot)
  );

  ripple_carry_adder #(.N(N)) u_add (
    .a  (feeder_q),
    .b  (a_q),
    .cin(1'b0),
    .sum(sum)
  );

  // Result multiplexer steered by B(i).
  assign result = hot_q ? sum : {1'b0, bypass_q};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      a_q      <= '0;
      b_q      <= '0;
      feeder_q <= '0;
      bypass_q <= '0;
      hot_q    <= 1'b0;
    end else if (load) begin
      // The empty partial product goes where B(0) says it will be read.
      a_q   <= a;
      b_q   <= b;
      hot_q <= b[0];
      if (b[0]) feeder_q <= '0;
      else      bypass_q <= '0;
    end else if (run) begin
      if (last) begin
        bypass_q <= result[N:1];      // final high half of the product
        hot_q    <= 1'b0;
      end else begin
        if (next_hot) feeder_q <= result[N:1];
        else          bypass_q <= result[N:1];
        hot_q <= next_hot;
      end
    end
  end

  product_lo_reg #(.N(N)) u_lo (
    .clk(clk),
    .rst(rst),
    .en (run),
    .sel(ring),
    .d  (result[0]),
    .q  (lo_q)
  );

  assign product = {bypass_q, lo_q};

  // While idle the ring counter must rest at bit 0, ready for the next start.
  always_ff @(posedge clk) begin
    if (!run) begin
      a_ring_home: assert (ring == N'(1))
        else $error("bzfad_multiplier: ring counter not at bit 0 while idle");
    end
  end

  initial begin
    assert (N >= 2 * BLOCK && N % BLOCK == 0)
      else $error("bzfad_multiplier: N must be a multiple of BLOCK with at least two blocks");
  end

endmodule
