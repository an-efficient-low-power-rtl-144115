// N-bit ripple-carry adder with carry in and carry out.
//
// A chain of N full adders; the carry of bit i feeds bit i+1. The published
// multiplier uses a ripple-carry adder because it makes the fewest
// transitions per addition among the common adder types; the full-adder
// equations are the textbook ones. Purely combinational: sum = a + b + cin,
// N+1 bits wide with the carry out as its MSB.
module ripple_carry_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N:0]   sum    // {carry out, N-bit sum}
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign sum[N] = c[N];

endmodule
