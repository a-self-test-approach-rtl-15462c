// Logic module: turns the session number into the Set and Reset vectors.
//
// During session s (run high, s < NUM_SESSIONS) it outputs SET_MASK[s] and
// RESET_MASK[s], the weight assignment of that session (Set bit = weight 1,
// Reset bit = weight 0, neither = weight 0.5). Outside a session it drives
// every Reset bit, which parks register A at all zeros and register B at all
// ones; that park state is a choice of this design. Combinational.
// Overlapping Set and Reset masks are rejected at elaboration.
module weight_logic #(
  parameter int unsigned N            = 5,
  parameter int unsigned NUM_SESSIONS = 2,
  parameter int unsigned SW           = $clog2(NUM_SESSIONS + 1),
  parameter logic [NUM_SESSIONS-1:0][N-1:0] SET_MASK   = wpg_pkg::C17_SET_MASK,
  parameter logic [NUM_SESSIONS-1:0][N-1:0] RESET_MASK = wpg_pkg::C17_RESET_MASK
) (
  input  logic          run,
  input  logic [SW-1:0] session,
  output logic [N-1:0]  set_mask,
  output logic [N-1:0]  reset_mask
);

  // A bit cannot be weight 1 and weight 0 in the same session.
  for (genvar s = 0; s < NUM_SESSIONS; s++) begin : g_check
    if ((SET_MASK[s] & RESET_MASK[s]) != '0) begin : g_overlap
      $error("weight_logic: SET_MASK and RESET_MASK overlap in session %0d", s);
    end
  end

  always_comb begin
    set_mask   = '0;
    reset_mask = '1;
    if (run) begin
      for (int unsigned s = 0; s < NUM_SESSIONS; s++) begin
        if (session == SW'(s)) begin
          set_mask   = SET_MASK[s];
          reset_mask = RESET_MASK[s];
        end
      end
    end
  end

endmodule
