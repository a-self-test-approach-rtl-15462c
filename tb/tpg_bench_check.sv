// Checker used by tb_tpg_benchmarks: one weighted_tpg of width N with NS
// sessions whose weight masks are generated from SALT, compared cycle by
// cycle with a behavioural reference (up to 256 bits). Reports its counts
// on ports once `finished` is high.
module tpg_bench_check #(
  parameter int unsigned N    = 60,
  parameter int unsigned NS   = 3,
  parameter int unsigned SALT = 1
) (
  input  logic clk,
  input  logic start,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int unsigned LW  = $clog2(N);
  localparam int unsigned PER = (1 << LW) - 1;
  localparam int unsigned SW  = $clog2(NS + 1);

  typedef logic [NS-1:0][N-1:0] masks_t;

  // Per bit: weight 0.5 with probability 1/2, 1 or 0 with 1/4 each.
  function automatic masks_t gen(input bit want_set);
    masks_t m;
    int unsigned x = SALT * 2654435761;
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < N; i++) begin
        x = x * 1103515245 + 12345;
        m[s][i] = want_set ? (x[17:16] == 2'b10) : (x[17:16] == 2'b11);
      end
    return m;
  endfunction

  localparam masks_t SM = gen(1'b1);
  localparam masks_t RM = gen(1'b0);

  logic          rst, run;
  logic [N-1:0]  pattern;
  logic          valid, done;
  logic [SW-1:0] session;

  weighted_tpg #(.N(N), .NUM_SESSIONS(NS), .SET_MASK(SM), .RESET_MASK(RM)) dut (
    .clk, .rst, .run, .pattern, .pattern_valid(valid), .session, .done);

  initial begin
    logic [255:0] a, b, s, r, free, msk;
    int k;
    checks = 0; failures = 0; finished = 0;
    rst = 1; run = 0;
    wait (start);
    @(negedge clk); @(negedge clk);
    rst = 0; run = 1;
    #1;
    msk = (256'd1 << N) - 1;
    a = '0; b = msk;
    k = 0;
    for (int ss = 0; ss < int'(NS); ss++) begin
      s = 256'(SM[ss]); r = 256'(RM[ss]); free = ~(s | r) & msk;
      checks++;
      if (s == 0 || r == 0 || (s & r) != 0 || free == 0) begin
        failures++;
        $display("FAIL N=%0d session %0d: degenerate weight assignment", N, ss);
      end
      a = (a & ~r) | s; b = (b & ~s) | r;
      for (int p = 0; p < int'(PER); p++) begin
        checks++;
        if (!valid || done || 256'(pattern) != a || int'(session) != ss) begin
          failures++;
          $display("FAIL N=%0d session %0d pattern %0d", N, ss, p);
        end
        a = ((a + b) & free & msk) | s;
        b = (msk & free) | r;
        @(negedge clk);
        k++;
      end
    end
    checks++;
    if (!done || valid || pattern != 0) begin
      failures++;
      $display("FAIL N=%0d not done after %0d patterns", N, k);
    end
    finished = 1;
  end

endmodule
