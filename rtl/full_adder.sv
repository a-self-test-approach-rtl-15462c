// One-bit full adder: s = a + b + cin, with carry out.
//
// Purely combinational. The weighted-pattern scheme relies on the rows of its
// truth table where a != b: there cout equals cin, so a cell whose two
// operands are complementary passes its carry on unchanged.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end

endmodule
