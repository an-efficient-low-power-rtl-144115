// Lower half of the product, written one bit per cycle and never shifted.
//
// In cycle i of a multiplication the least significant bit of the new partial
// product is final: it is bit i of the product. The ring counter marks cycle i
// with its one-hot bit i, so bit i of this register is written only when
// en and sel[i] are 1; every other bit keeps its value, and no bit ever moves.
// This replaces the shifting lower half of the partial-product register of a
// conventional shift-and-add multiplier.
//
// Interface and timing: rising-edge clk; q[i] takes d at the edge that ends a
// cycle with en = 1 and sel[i] = 1. rst (asynchronous, active high) clears it.
//
// The published design uses N transparent latches whose gates are the ring
// counter bits. Here each bit is a flip-flop with its ring bit as write
// enable: the ring bit that closes a latch falls at the same clock edge at
// which the latch's data changes, a hold race that an edge-triggered capture
// avoids. The write-once-per-bit behaviour is the same.
module product_lo_reg #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,    // a multiplication cycle is in progress
  input  logic [N-1:0] sel,   // one-hot: which bit is finalised in this cycle
  input  logic         d,     // the finalised product bit
  output logic [N-1:0] q
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        q[i] <= 1'b0;
      end else if (en && sel[i]) begin
        q[i] <= d;
      end
    end
  end

endmodule
