// BIST test controller.
//
// Three states (wpg_pkg::ctl_state_e). IDLE: the pattern generator is held in
// reset, the response analyzer is cleared and the CUT sees the system inputs.
// A high `bist_start` moves to RUN: the generator runs, test_mode switches the
// CUT inputs to the generator and the analyzer compacts. When the generator
// reports `tpg_done` the controller moves to DONE and raises `bist_done`
// (the pass/fail result is then valid); it returns to IDLE once bist_start
// is released. Synchronous, active-high reset to IDLE. The state encoding and
// handshake are choices of this design.
module test_controller (
  input  logic clk,
  input  logic rst,
  input  logic bist_start,
  input  logic tpg_done,
  output logic tpg_rst,
  output logic tpg_run,
  output logic test_mode,
  output logic ora_init,
  output logic bist_done
);

  import wpg_pkg::*;

  ctl_state_e state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      CTL_IDLE: if (bist_start) state_n = CTL_RUN;
      CTL_RUN:  if (tpg_done)   state_n = CTL_DONE;
      CTL_DONE: if (!bist_start) state_n = CTL_IDLE;
      default:  state_n = CTL_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= CTL_IDLE;
    else     state <= state_n;
  end

  assign tpg_rst   = (state == CTL_IDLE);
  assign tpg_run   = (state == CTL_RUN);
  assign test_mode = (state == CTL_RUN);
  assign ora_init  = (state == CTL_IDLE);
  assign bist_done = (state == CTL_DONE);

endmodule
