// One-hot selected bit multiplexer.
//
// Picks the bit of data whose position is marked by the single 1 in sel:
// y = OR over i of (data[i] AND sel[i]). In the multiplier it replaces the
// shifting B register of a conventional shift-and-add design: B stays still
// and the ring counter steers this multiplexer, so B's flip-flops never
// toggle during a multiplication. Purely combinational. With more than one
// select bit set the result is the OR of the selected bits; with none it is 0.
//
// The published design names a multiplexer with a one-hot bus selector; the
// AND-OR form is this design's choice (the published cells are transmission
// gates).
module onehot_mux #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] data,
  input  logic [N-1:0] sel,   // one-hot
  output logic         y
);

  assign y = |(data & sel);

endmodule
