// Reference model of a conventional radix-2 shift-and-add multiplier, used
// only to compare switching activity with the BZ-FAD multiplier.
//
// Every cycle it adds (B(0) ? A : 0) to the upper half of a 2N-bit partial
// product register, shifts that register and B right by one, and increments
// a binary cycle counter. start loads the operands (the same handshake as
// bzfad_multiplier); done pulses N edges later. Its registers are public so
// that a testbench can count their bit toggles.
module conv_shift_add #(
  parameter int unsigned N = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           done,
  output logic [2*N-1:0] product
);

  localparam int unsigned CW = $clog2(N);

  logic           run;
  logic [N-1:0]   a_q, b_q;
  logic [CW-1:0]  cnt;
  logic [2*N-1:0] pp;
  logic [N-1:0]   addend;   // output of the A / 0 multiplexer
  logic [N:0]     sum;

  assign addend  = b_q[0] ? a_q : '0;
  assign sum     = {1'b0, pp[2*N-1:N]} + {1'b0, addend};
  assign product = pp;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      run <= 1'b0; done <= 1'b0; a_q <= '0; b_q <= '0; cnt <= '0; pp <= '0;
    end else begin
      done <= 1'b0;
      if (!run && start) begin
        run <= 1'b1; a_q <= a; b_q <= b; cnt <= '0; pp <= '0;
      end else if (run) begin
        pp  <= {sum, pp[N-1:1]};
        b_q <= b_q >> 1;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(N - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
