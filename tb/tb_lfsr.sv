// Testbench of lfsr at widths 3 (the default), 5 and 8: the register must
// visit 2**W-1 distinct non-zero states before returning to its seed, and
// `wrap` must be high exactly in the last state of each period.
module tb_lfsr;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, en;
  always #5 clk = ~clk;

  logic [2:0] s3; logic w3;
  logic [4:0] s5; logic w5;
  logic [7:0] s8; logic w8;
  lfsr             d3 (.clk, .rst, .en, .state(s3), .wrap(w3));
  lfsr #(.W(5))    d5 (.clk, .rst, .en, .state(s5), .wrap(w5));
  lfsr #(.W(8), .SEED(8'hA5)) d8 (.clk, .rst, .en, .state(s8), .wrap(w8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen3 [8], seen5 [32], seen8 [256];
  int per3 = 0, per5 = 0, per8 = 0;

  initial begin
    rst = 1; en = 0;
    @(negedge clk); @(negedge clk);
    rst = 0; en = 1;
    checks++; if (s3 != 3'd1 || s5 != 5'd1 || s8 != 8'hA5) begin failures++; $display("FAIL seed"); end
    for (int c = 0; c < 255; c++) begin
      if (c < 7)   begin checks++; if (seen3[s3] || s3 == 0) begin failures++; $display("FAIL s3 %0d", s3); end seen3[s3] = 1; per3++; end
      if (c < 31)  begin checks++; if (seen5[s5] || s5 == 0) begin failures++; $display("FAIL s5 %0d", s5); end seen5[s5] = 1; per5++; end
      if (c < 255) begin checks++; if (seen8[s8] || s8 == 0) begin failures++; $display("FAIL s8 %0d", s8); end seen8[s8] = 1; per8++; end
      checks++; if (w3 != (c % 7 == 6))   begin failures++; $display("FAIL wrap3 c=%0d", c); end
      checks++; if (w5 != (c % 31 == 30)) begin failures++; $display("FAIL wrap5 c=%0d", c); end
      checks++; if (w8 != (c == 254))     begin failures++; $display("FAIL wrap8 c=%0d", c); end
      @(negedge clk);
    end
    checks++; if (s8 != 8'hA5) begin failures++; $display("FAIL s8 end"); end
    // hold when en is low
    en = 0;
    begin
      logic [4:0] h;
      h = s5;
      repeat (3) @(negedge clk);
      checks++; if (s5 != h) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
