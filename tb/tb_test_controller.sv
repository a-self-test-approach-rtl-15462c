// Testbench of test_controller: IDLE -> RUN on bist_start, RUN -> DONE on
// tpg_done, DONE -> IDLE when bist_start drops, with the outputs of each state.
module tb_test_controller;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, bist_start, tpg_done;
  logic tpg_rst, tpg_run, test_mode, ora_init, bist_done;
  always #5 clk = ~clk;
  test_controller dut (.clk, .rst, .bist_start, .tpg_done, .tpg_rst, .tpg_run, .test_mode, .ora_init, .bist_done);

  // expected outputs {tpg_rst, tpg_run, test_mode, ora_init, bist_done}
  localparam logic [4:0] O_IDLE = 5'b10010, O_RUN = 5'b01100, O_DONE = 5'b00001;

  task automatic expect_out(input logic [4:0] e, input string what);
    checks++;
    if ({tpg_rst, tpg_run, test_mode, ora_init, bist_done} != e) begin
      failures++; $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; bist_start = 0; tpg_done = 0;
    @(negedge clk); rst = 0;
    for (int round = 0; round < 3; round++) begin
      repeat (2) @(negedge clk);
      expect_out(O_IDLE, "idle");
      bist_start = 1; tpg_done = 1;   // done ignored in IDLE
      #1 expect_out(O_IDLE, "idle before edge");
      tpg_done = 0;
      @(negedge clk); expect_out(O_RUN, "run");
      repeat (3 + round) begin @(negedge clk); expect_out(O_RUN, "run holds"); end
      tpg_done = 1;
      @(negedge clk); expect_out(O_DONE, "done");
      tpg_done = 0;
      repeat (2) begin @(negedge clk); expect_out(O_DONE, "done holds while start high"); end
      bist_start = 0;
      @(negedge clk); expect_out(O_IDLE, "back to idle");
    end
    bist_start = 1; @(negedge clk);
    rst = 1; @(negedge clk); expect_out(O_IDLE, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
