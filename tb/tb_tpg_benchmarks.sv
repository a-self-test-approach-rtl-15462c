// Runs weighted_tpg at the input counts of larger ISCAS-85 circuits used in
// the overhead comparisons (c1908: 33, c880: 60, c2670: 233 inputs) with
// generated weight assignments of three sessions each. Each instance is
// checked pattern by pattern against a reference model; session length is
// 2**ceil(log2 N)-1 patterns (63, 63 and 255).
module tb_tpg_benchmarks;
  logic clk = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  tpg_bench_check #(.N(33),  .NS(3), .SALT(7))  u_c1908 (.clk, .start, .checks(c0), .failures(f0), .finished(d0));
  tpg_bench_check #(.N(60),  .NS(3), .SALT(11)) u_c880  (.clk, .start, .checks(c1), .failures(f1), .finished(d1));
  tpg_bench_check #(.N(233), .NS(3), .SALT(13)) u_c2670 (.clk, .start, .checks(c2), .failures(f2), .finished(d2));

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    #20 start = 1'b1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
