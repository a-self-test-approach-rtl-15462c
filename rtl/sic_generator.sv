// Low-power single-input-change (SIC) pattern generator.
//
// A W-bit seed register, stepped as a maximal-length LFSR, is XORed with the
// gray code of a W-bit counter: pattern = seed ^ (count ^ (count >> 1)).
// Between two seeds the counter runs through all 2**W values, so the seed
// itself is followed by 2**W-1 vectors that each differ from the one before
// in exactly one bit. When the counter wraps the LFSR steps once to the next
// seed; it is clocked only once per 2**W patterns, which keeps its own
// switching low. `new_seed` is high while the pattern equals a fresh seed
// (count = 0). Synchronous reset loads SEED and clears the counter; the
// generator steps on each clock with `en` high. The gray-code/seed XOR
// structure follows the scheme; the seed LFSR polynomial, SEED and widths are
// choices of this design.
module sic_generator #(
  parameter int unsigned  W    = wpg_pkg::C17_INPUTS,
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] pattern,
  output logic         new_seed
);

  logic [W-1:0] count;
  logic [W-1:0] seed;
  logic         seed_wrap_unused;
  logic         last;

  assign last     = (count == '1);
  assign new_seed = (count == '0);
  assign pattern  = seed ^ (count ^ (count >> 1));

  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

  lfsr #(.W(W), .SEED(SEED)) u_seed (
    .clk  (clk),
    .rst  (rst),
    .en   (en && last),
    .state(seed),
    .wrap (seed_wrap_unused)
  );

endmodule
