// Shared constants and types of the accumulator-based 3-weight BIST.
//
// The default configuration targets the five-input c17 benchmark. Its four
// deterministic test vectors are split into two subsets, and each subset is
// turned into one weight assignment (0, 1 or 0.5 per input):
//   S1 = {T1,T4}: A[4:0] weights  - - 1 - 1
//   S2 = {T2,T3}: A[4:0] weights  - - 0 1 0
// A weight of 1 becomes a Set bit, a weight of 0 a Reset bit, and 0.5 neither.
// Mask arrays are indexed [session][bit]. The test-controller state type and
// the maximal-length LFSR tap table used by every LFSR of the design also live
// here.
package wpg_pkg;

  localparam int unsigned C17_INPUTS   = 5;
  localparam int unsigned C17_SESSIONS = 2;

  // In the literals the last element is index 0 (subset S1), the first index 1 (S2).
  localparam logic [C17_SESSIONS-1:0][C17_INPUTS-1:0] C17_SET_MASK   = {5'b00010, 5'b00101};
  localparam logic [C17_SESSIONS-1:0][C17_INPUTS-1:0] C17_RESET_MASK = {5'b00101, 5'b00000};

  typedef enum logic [1:0] {
    CTL_IDLE = 2'd0,  // generator held in reset, CUT sees the system inputs
    CTL_RUN  = 2'd1,  // sessions running, responses compacted
    CTL_DONE = 2'd2   // result valid until bist_start is released
  } ctl_state_e;

  // Feedback tap mask of a maximal-length Fibonacci LFSR of the given width:
  // bit k-1 set for tap k of the usual tap tables.
  function automatic logic [31:0] lfsr_taps(input int unsigned width);
    case (width)
      2:       return 32'h0000_0003;
      3:       return 32'h0000_0006;
      4:       return 32'h0000_000C;
      5:       return 32'h0000_0014;
      6:       return 32'h0000_0030;
      7:       return 32'h0000_0060;
      8:       return 32'h0000_00B8;
      9:       return 32'h0000_0110;
      10:      return 32'h0000_0240;
      11:      return 32'h0000_0500;
      12:      return 32'h0000_0829;
      13:      return 32'h0000_100D;
      14:      return 32'h0000_2015;
      15:      return 32'h0000_6000;
      16:      return 32'h0000_D008;
      default: return 32'h0000_0003;
    endcase
  endfunction

endpackage
