// Accumulator-based 3-weight test pattern generator.
//
// An LFSR of LFSR_W stages steps once per pattern; each time it completes its
// period (2**LFSR_W-1 patterns) the session counter moves to the next
// session. The logic module turns the session number into Set/Reset vectors
// for the weighted accumulator, which adds the constant ADDEND to register A
// every clock while holding the weight-1 and weight-0 bits steady. Its
// register A is the test pattern.
//
// Interface: pulse `rst` (synchronous, active high), then raise `run`.
// Timing: while run is high and done low, `pattern_valid` is high and
// `pattern` holds one new pattern per clock cycle, to be sampled on the
// rising edge that ends the cycle. The first pattern is there in the cycle in
// which run rises (the session-0 forcing is asynchronous). After
// NUM_SESSIONS*(2**LFSR_W-1) patterns `done` rises and register A is parked
// at zero. With the c17 defaults that is 2 sessions of 7 patterns, and the
// generator holds 15 flip-flops: 5 in register A, 5 in register B, 3 in the
// LFSR and 2 in the session counter.
// The register, cell and Set/Reset wiring follow the scheme; tying the
// session length to the LFSR period, the all-ones addend and the park state
// are choices of this design.
module weighted_tpg #(
  parameter int unsigned N            = wpg_pkg::C17_INPUTS,
  parameter int unsigned NUM_SESSIONS = wpg_pkg::C17_SESSIONS,
  parameter int unsigned LFSR_W       = $clog2(N),
  parameter int unsigned SW           = $clog2(NUM_SESSIONS + 1),
  parameter logic [N-1:0] ADDEND      = '1,
  parameter logic [NUM_SESSIONS-1:0][N-1:0] SET_MASK   = wpg_pkg::C17_SET_MASK,
  parameter logic [NUM_SESSIONS-1:0][N-1:0] RESET_MASK = wpg_pkg::C17_RESET_MASK
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  output logic [N-1:0]  pattern,
  output logic          pattern_valid,
  output logic [SW-1:0] session,
  output logic          done
);

  logic [LFSR_W-1:0] lfsr_state;
  logic              lfsr_wrap;
  logic              active;
  logic [N-1:0]      set_mask, reset_mask, reg_b;
  logic              unused_cout;

  assign active        = run && !done;
  assign pattern_valid = active;

  lfsr #(.W(LFSR_W)) u_lfsr (
    .clk  (clk),
    .rst  (rst),
    .en   (active),
    .state(lfsr_state),
    .wrap (lfsr_wrap)
  );

  session_counter #(.NUM_SESSIONS(NUM_SESSIONS), .SW(SW)) u_sessions (
    .clk    (clk),
    .rst    (rst),
    .advance(active && lfsr_wrap),
    .session(session),
    .done   (done)
  );

  weight_logic #(
    .N(N), .NUM_SESSIONS(NUM_SESSIONS), .SW(SW),
    .SET_MASK(SET_MASK), .RESET_MASK(RESET_MASK)
  ) u_logic (
    .run       (run && !rst),
    .session   (session),
    .set_mask  (set_mask),
    .reset_mask(reset_mask)
  );

  weighted_accumulator #(.N(N)) u_acc (
    .clk       (clk),
    .set_mask  (set_mask),
    .reset_mask(reset_mask),
    .addend    (ADDEND),
    .cin       (1'b0),
    .a         (pattern),
    .b         (reg_b),
    .cout      (unused_cout)
  );

endmodule
