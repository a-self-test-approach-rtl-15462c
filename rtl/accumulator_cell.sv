// One bit slice of the weighted accumulator.
//
// A full adder adds A[i], B[i] and the incoming carry; its sum is the D input
// of the A[i] flip-flop, whose output drives both the adder and the circuit
// under test. The B[i] flip-flop holds this bit of the constant addend (b_d).
// Both flip-flops have asynchronous set and reset, wired crosswise:
//   set_i   -> set of A[i], reset of B[i]   => A[i]=1, B[i]=0 (weight 1)
//   reset_i -> reset of A[i], set of B[i]   => A[i]=0, B[i]=1 (weight 0)
//   neither                                 => ordinary accumulator bit (weight 0.5)
// In the two forced cases A[i] = NOT B[i], so the adder's carry out equals its
// carry in and the bits above keep counting as if this bit were not there. The
// adder itself is untouched. Forcing takes effect at once; the sum is loaded
// on the rising clock edge.
module accumulator_cell (
  input  logic clk,
  input  logic set_i,
  input  logic reset_i,
  input  logic b_d,
  input  logic cin,
  output logic cout,
  output logic a_q,
  output logic b_q
);

  logic sum;

  full_adder u_fa (
    .a   (a_q),
    .b   (b_q),
    .cin (cin),
    .s   (sum),
    .cout(cout)
  );

  sr_dff u_a (.clk(clk), .set(set_i),   .rst(reset_i), .d(sum), .q(a_q));
  sr_dff u_b (.clk(clk), .set(reset_i), .rst(set_i),   .d(b_d), .q(b_q));

endmodule
