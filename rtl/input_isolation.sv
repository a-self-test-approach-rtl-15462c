// Input isolation circuitry in front of the circuit under test.
//
// A 2:1 multiplexer per CUT input: in test mode the CUT takes the pattern
// generator's outputs, otherwise the system inputs. Combinational.
module input_isolation #(
  parameter int unsigned N = wpg_pkg::C17_INPUTS
) (
  input  logic         test_mode,
  input  logic [N-1:0] sys_in,
  input  logic [N-1:0] tpg_in,
  output logic [N-1:0] cut_in
);

  assign cut_in = test_mode ? tpg_in : sys_in;

endmodule
