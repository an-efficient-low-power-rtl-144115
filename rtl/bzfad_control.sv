// Sequencer of one BZ-FAD multiplication.
//
// The multiplier needs no binary cycle counter: the ring counter already says
// which multiplier bit is being processed, and the cycle in which its last
// bit (bit N-1) is hot is the last cycle. This block only keeps the idle/run
// state:
//   idle: load = start. On a rising edge with start = 1 the datapath loads
//         its operands and the state becomes run.
//   run:  one cycle per multiplier bit. On the edge that ends the cycle with
//         last = 1 the state returns to idle and done pulses for one cycle.
// A start while running is ignored.
//
// Interface and timing: rising-edge clk, asynchronous active-high rst. run is
// the registered state and is also the enable of the ring counter, so it
// changes only just after a rising edge. done is high in the first cycle after
// the product is complete, N rising edges after the edge that accepted start.
// The start/busy/done handshake is this design's own; the published design
// gives no interface.
module bzfad_control
  import bzfad_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,  // request a multiplication (sampled while idle)
  input  logic last,   // ring-counter bit N-1 is hot
  output logic load,   // load operands and clear the partial product this edge
  output logic run,    // a multiplication cycle is in progress
  output logic done    // one-cycle pulse: product is valid
);

  state_e state_q;

  assign run  = (state_q == ST_RUN);
  assign load = (state_q == ST_IDLE) && start;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= ST_IDLE;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (start) state_q <= ST_RUN;
        ST_RUN: begin
          if (last) begin
            state_q <= ST_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

endmodule
