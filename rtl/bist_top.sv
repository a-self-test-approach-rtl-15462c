// Built-in self-test around a circuit under test, using an accumulator-based
// 3-weight pattern generator.
//
// The test controller waits for `bist_start`, then lets weighted_tpg apply
// its weighted sessions to the CUT through the input isolation multiplexer;
// each response is compacted by the MISR. When the generator has finished,
// `bist_done` rises and `bist_pass` tells whether the signature equals GOLDEN.
// The CUT itself sits outside this module: `cut_in` drives its inputs and its
// outputs return on `cut_out` in the same cycle (a combinational CUT is
// assumed). `sys_out` passes the CUT outputs on in normal operation.
// Beside it, and not connected to it, the gray-code single-input-change
// generator runs on `sic_en` and shows its patterns on `sic_pattern`.
// The default GOLDEN is the signature of the c17 benchmark under the default
// generator; change it with the CUT.
module bist_top #(
  parameter int unsigned N            = wpg_pkg::C17_INPUTS,
  parameter int unsigned M            = 2,
  parameter int unsigned NUM_SESSIONS = wpg_pkg::C17_SESSIONS,
  parameter int unsigned LFSR_W       = $clog2(N),
  parameter int unsigned SW           = $clog2(NUM_SESSIONS + 1),
  parameter int unsigned SIG_W        = 8,
  parameter logic [N-1:0] ADDEND      = '1,
  parameter logic [NUM_SESSIONS-1:0][N-1:0] SET_MASK   = wpg_pkg::C17_SET_MASK,
  parameter logic [NUM_SESSIONS-1:0][N-1:0] RESET_MASK = wpg_pkg::C17_RESET_MASK,
  parameter logic [SIG_W-1:0] GOLDEN  = SIG_W'(8'h60)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bist_start,
  output logic             bist_done,
  output logic             bist_pass,
  input  logic [N-1:0]     sys_in,
  output logic [N-1:0]     cut_in,
  input  logic [M-1:0]     cut_out,
  output logic [M-1:0]     sys_out,
  output logic [SIG_W-1:0] signature,
  output logic [SW-1:0]    session,
  input  logic             sic_en,
  output logic [N-1:0]     sic_pattern
);

  logic         tpg_rst, tpg_run, tpg_done, tpg_valid, test_mode, ora_init, match;
  logic [N-1:0] tpg_pattern;
  logic         sic_new_seed_unused;

  test_controller u_ctl (
    .clk       (clk),
    .rst       (rst),
    .bist_start(bist_start),
    .tpg_done  (tpg_done),
    .tpg_rst   (tpg_rst),
    .tpg_run   (tpg_run),
    .test_mode (test_mode),
    .ora_init  (ora_init),
    .bist_done (bist_done)
  );

  weighted_tpg #(
    .N(N), .NUM_SESSIONS(NUM_SESSIONS), .LFSR_W(LFSR_W), .SW(SW),
    .ADDEND(ADDEND), .SET_MASK(SET_MASK), .RESET_MASK(RESET_MASK)
  ) u_tpg (
    .clk          (clk),
    .rst          (rst || tpg_rst),
    .run          (tpg_run),
    .pattern      (tpg_pattern),
    .pattern_valid(tpg_valid),
    .session      (session),
    .done         (tpg_done)
  );

  input_isolation #(.N(N)) u_iso (
    .test_mode(test_mode),
    .sys_in   (sys_in),
    .tpg_in   (tpg_pattern),
    .cut_in   (cut_in)
  );

  ora_misr #(.W(SIG_W), .IN_W(M)) u_ora (
    .clk      (clk),
    .init     (rst || ora_init),
    .en       (tpg_valid),
    .data_in  (cut_out),
    .golden   (GOLDEN),
    .signature(signature),
    .match    (match)
  );

  assign bist_pass = bist_done && match;
  assign sys_out   = cut_out;

  sic_generator #(.W(N)) u_sic (
    .clk     (clk),
    .rst     (rst),
    .en      (sic_en),
    .pattern (sic_pattern),
    .new_seed(sic_new_seed_unused)
  );

endmodule
