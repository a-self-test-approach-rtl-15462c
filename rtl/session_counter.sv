// Test-session counter.
//
// Counts from 0 up to NUM_SESSIONS, one step per clock with `advance` high,
// and then stays there. Values 0..NUM_SESSIONS-1 name the session being
// applied; `done` is high once all sessions have been applied. Synchronous,
// active-high reset to 0.
module session_counter #(
  parameter int unsigned NUM_SESSIONS = 2,
  parameter int unsigned SW           = $clog2(NUM_SESSIONS + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          advance,
  output logic [SW-1:0] session,
  output logic          done
);

  assign done = (session == SW'(NUM_SESSIONS));

  always_ff @(posedge clk) begin
    if (rst)                   session <= '0;
    else if (advance && !done) session <= session + 1'b1;
  end

endmodule
