// Testbench of weight_logic: the masks for each session must match the
// weight assignments W(S1) = {-,-,1,-,1} and W(S2) = {-,-,0,1,0} (A[4]
// first); outside a session, or with run low, all Reset bits are high.
module tb_weight_logic;
  int checks = 0, failures = 0;
  logic run;
  logic [1:0] session;
  logic [4:0] set_mask, reset_mask;
  weight_logic dut (.run, .session, .set_mask, .reset_mask);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string w [2] = '{"--1-1", "--010"};
    for (int r = 0; r < 2; r++)
      for (int s = 0; s < 4; s++) begin
        logic [4:0] es, er;
        es = '0; er = '0;
        run = r[0]; session = 2'(s);
        if (r == 1 && s < 2) begin
          for (int i = 0; i < 5; i++) begin
            if (w[s][i] == "1") es[4-i] = 1'b1;
            if (w[s][i] == "0") er[4-i] = 1'b1;
          end
        end else er = '1;
        #1;
        checks++;
        if (set_mask != es || reset_mask != er) begin
          failures++;
          $display("FAIL run=%0d session=%0d set=%b reset=%b", r, s, set_mask, reset_mask);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
