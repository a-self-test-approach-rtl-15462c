// Maximal-length Fibonacci LFSR with a period-end flag.
//
// Shifts left by one each clock that `en` is high; the new bit 0 is the XOR of
// the tapped bits (taps from wpg_pkg::lfsr_taps, a primitive polynomial for
// each width 2..16). `rst` (synchronous) loads SEED, which must be non-zero.
// `wrap` is high in the last state of the period, i.e. when the next step
// brings the register back to SEED, so it pulses once every 2**W-1 steps.
module lfsr #(
  parameter int unsigned   W    = 3,
  parameter logic [W-1:0]  SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] state,
  output logic         wrap
);

  localparam logic [W-1:0] TAPS = W'(wpg_pkg::lfsr_taps(W));

  logic [W-1:0] nxt;

  always_comb begin
    if (W == 1) nxt = state;  // no feedback exists for one bit
    else        nxt = {state[W-2:0], ^(state & TAPS)};
    wrap = (nxt == SEED);
  end

  always_ff @(posedge clk) begin
    if (rst)     state <= SEED;
    else if (en) state <= nxt;
  end

endmodule
