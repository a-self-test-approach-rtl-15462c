// Testbench of input_isolation: random inputs in both modes.
module tb_input_isolation;
  int checks = 0, failures = 0;
  logic test_mode;
  logic [4:0] sys_in, tpg_in, cut_in;
  input_isolation dut (.test_mode, .sys_in, .tpg_in, .cut_in);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      test_mode = 1'($urandom); sys_in = 5'($urandom); tpg_in = 5'($urandom);
      #1;
      checks++;
      if (cut_in != (test_mode ? tpg_in : sys_in)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
