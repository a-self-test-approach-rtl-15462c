// Output response analyzer: multiple-input signature register (MISR).
//
// A W-bit Galois LFSR with feedback polynomial POLY (default
// x^8+x^4+x^3+x^2+1) into which the IN_W response bits are XORed, low bits
// first, on every clock with `en` high:
//   sig <= {sig[W-2:0],1'b0} ^ (sig[W-1] ? POLY : 0) ^ data_in
// `init` (synchronous, priority over en) clears it. `match` compares the
// signature with the expected value `golden` combinationally. The polynomial
// and width are choices of this design.
module ora_misr #(
  parameter int unsigned  W    = 8,
  parameter int unsigned  IN_W = 2,
  parameter logic [W-1:0] POLY = W'(8'h1D)
) (
  input  logic            clk,
  input  logic            init,
  input  logic            en,
  input  logic [IN_W-1:0] data_in,
  input  logic [W-1:0]    golden,
  output logic [W-1:0]    signature,
  output logic            match
);

  logic [W-1:0] nxt;

  always_comb begin
    nxt = {signature[W-2:0], 1'b0} ^ (signature[W-1] ? POLY : '0);
    nxt = nxt ^ W'(data_in);
    match = (signature == golden);
  end

  always_ff @(posedge clk) begin
    if (init)    signature <= '0;
    else if (en) signature <= nxt;
  end

endmodule
