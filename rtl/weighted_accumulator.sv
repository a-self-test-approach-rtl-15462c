// N-bit accumulator used as a 3-weight test pattern generator.
//
// Register A, the adder and register B of the scheme, built as N
// accumulator_cell slices with the carry rippling from bit 0 upward. Each
// clock, A <= A + B (carry out of the top bit is dropped). Register B loads
// `addend` every clock, so with no bit forced the circuit is a plain
// accumulator adding a constant. set_mask[i] forces A[i]=1/B[i]=0 and
// reset_mask[i] forces A[i]=0/B[i]=1, asynchronously; forced bits pass the
// carry through, so the unforced bits together behave as a smaller
// accumulator adding the unforced bits of `addend`.
// Timing: pattern `a` changes after each rising edge and immediately when a
// mask bit rises.
module weighted_accumulator #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic [N-1:0] set_mask,
  input  logic [N-1:0] reset_mask,
  input  logic [N-1:0] addend,
  input  logic         cin,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic         cout
);

  logic [N:0] carry;
  assign carry[0] = cin;
  assign cout     = carry[N];

  for (genvar i = 0; i < N; i++) begin : g_cell
    accumulator_cell u_cell (
      .clk    (clk),
      .set_i  (set_mask[i]),
      .reset_i(reset_mask[i]),
      .b_d    (addend[i]),
      .cin    (carry[i]),
      .cout   (carry[i+1]),
      .a_q    (a[i]),
      .b_q    (b[i])
    );
  end

endmodule
