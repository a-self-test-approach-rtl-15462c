// Testbench of session_counter: counts advance pulses, stops at
// NUM_SESSIONS with done high, and clears on reset. Default (2 sessions) and
// 5 sessions.
module tb_session_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, adv;
  always #5 clk = ~clk;
  logic [1:0] s2; logic d2;
  logic [2:0] s5; logic d5;
  session_counter                    u2 (.clk, .rst, .advance(adv), .session(s2), .done(d2));
  session_counter #(.NUM_SESSIONS(5)) u5 (.clk, .rst, .advance(adv), .session(s5), .done(d5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    rst = 1; adv = 0;
    @(negedge clk); rst = 0;
    for (int c = 0; c < 60; c++) begin
      adv = 1'($urandom);
      checks++;
      if (int'(s2) != (n < 2 ? n : 2) || d2 != (n >= 2)) begin failures++; $display("FAIL s2 n=%0d", n); end
      checks++;
      if (int'(s5) != (n < 5 ? n : 5) || d5 != (n >= 5)) begin failures++; $display("FAIL s5 n=%0d", n); end
      @(negedge clk);
      if (adv) n++;
    end
    rst = 1; @(negedge clk);
    checks++; if (s2 != 0 || s5 != 0 || d2 || d5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
