// Testbench of sic_generator at W=5 (default) and W=4.
// Within a seed block consecutive patterns differ in exactly one bit and all
// 2**W patterns are distinct; a new seed starts every 2**W cycles; the seeds
// of one LFSR period are non-zero and distinct; en low freezes the output.
module tb_sic_generator;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, en;
  always #5 clk = ~clk;
  logic [4:0] p5; logic n5;
  logic [3:0] p4; logic n4;
  sic_generator             d5 (.clk, .rst, .en, .pattern(p5), .new_seed(n5));
  sic_generator #(.W(4))    d4 (.clk, .rst, .en, .pattern(p4), .new_seed(n4));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] prev5, seed5;
    logic [3:0] prev4;
    bit seeds [32];
    bit inblk [32];
    rst = 1; en = 0;
    repeat (2) @(negedge clk);
    rst = 0; en = 1;
    check(p5 == 5'd1 && n5, "first pattern is the seed");
    for (int c = 0; c < 31 * 32; c++) begin
      if (c % 32 == 0) begin
        check(n5, "n=5 new seed every 32");
        check(p5 != 0 && !seeds[p5], "n=5 seed non-zero and new");
        seeds[p5] = 1;
        foreach (inblk[i]) inblk[i] = 0;
      end else begin
        check(!n5, "n=5 no seed mid-block");
        check($countones(p5 ^ prev5) == 1, "n=5 single input change");
      end
      check(!inblk[p5], "n=5 distinct in block");
      inblk[p5] = 1;
      if (c < 16 * 20) begin
        if (c % 16 == 0) check(n4, "n=4 new seed every 16");
        else check($countones(p4 ^ prev4) == 1, "n=4 single input change");
      end
      prev5 = p5; prev4 = p4;
      @(negedge clk);
    end
    check(n5 && p5 == 5'd1, "seed sequence repeats after 31 seeds");
    en = 0; seed5 = p5;
    repeat (3) @(negedge clk);
    check(p5 == seed5, "frozen with en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
