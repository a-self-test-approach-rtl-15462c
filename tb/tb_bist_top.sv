// End-to-end testbench of bist_top at its default parameters, with the c17
// benchmark model as circuit under test.
//
// A behavioural reference, written from the weight strings of the two test
// sessions, predicts every pattern (A starts parked at 0, forced bits are
// applied at the start of each session, free bits accumulate the all-ones
// addend) and the MISR signature. The test checks each pattern the CUT sees,
// the test length (2 sessions x 7 patterns), normal-mode isolation, the
// pass/fail verdict for the fault-free c17 and for each of its 22 single
// stuck-at faults, and the SIC generator beside the BIST. It counts how often
// each mechanism happened: weight-1 and weight-0 forcing, carry passing
// through a forced cell, session change, pass, fail, normal mode, new SIC seed.
module tb_bist_top;

  localparam int N = 5, M = 2, SIG_W = 8, NS = 2, PER = 7;
  localparam int NPAT = NS * PER;

  logic clk = 1'b0;
  logic rst, bist_start, bist_done, bist_pass, sic_en;
  logic [N-1:0] sys_in, cut_in, sic_pattern;
  logic [M-1:0] cut_out, sys_out;
  logic [SIG_W-1:0] signature;
  logic [1:0] session;
  logic [4:0] fault;

  int checks = 0, failures = 0;
  int n_force1 = 0, n_force0 = 0, n_carry_pass = 0, n_session_change = 0;
  int n_pass = 0, n_fail = 0, n_normal = 0, n_new_seed = 0, n_detected = 0;

  always #5 clk = ~clk;

  bist_top dut (
    .clk, .rst, .bist_start, .bist_done, .bist_pass, .sys_in, .cut_in,
    .cut_out, .sys_out, .signature, .session, .sic_en, .sic_pattern
  );

  c17_model u_cut (.a(cut_in), .fault(fault), .y(cut_out));

  // Reference CUT, driven by the predicted pattern.
  logic [N-1:0] ref_pat;
  logic [4:0]   ref_fault;
  logic [M-1:0] ref_y;
  c17_model u_ref (.a(ref_pat), .fault(ref_fault), .y(ref_y));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Weight string, leftmost character is A[4]: '1', '0' or '-' (0.5).
  function automatic void masks(input string w, output logic [N-1:0] s, output logic [N-1:0] r);
    s = '0; r = '0;
    for (int i = 0; i < N; i++) begin
      if (w[i] == "1") s[N-1-i] = 1'b1;
      if (w[i] == "0") r[N-1-i] = 1'b1;
    end
  endfunction

  logic [N-1:0] exp_pat [NPAT];
  logic [N-1:0] exp_set [NPAT];
  logic [N-1:0] exp_rst [NPAT];

  function automatic void predict();
    string w [NS] = '{"--1-1", "--010"};
    logic [N-1:0] a = '0, b = '1, s, r, free;
    int k = 0;
    for (int ss = 0; ss < NS; ss++) begin
      masks(w[ss], s, r);
      free = ~(s | r);
      a = (a & ~r) | s;
      b = (b & ~s) | r;
      for (int p = 0; p < PER; p++) begin
        exp_pat[k] = a; exp_set[k] = s; exp_rst[k] = r; k++;
        a = (N'(a + b) & free) | s;
        b = ({N{1'b1}} & free) | r;
      end
    end
  endfunction

  function automatic logic [SIG_W-1:0] misr_step(input logic [SIG_W-1:0] sig, input logic [M-1:0] d);
    logic [SIG_W:0] wide = {sig, 1'b0} ^ (SIG_W+1)'(d);
    if (wide[SIG_W]) wide = wide ^ 9'h11D;   // x^8+x^4+x^3+x^2+1
    return wide[SIG_W-1:0];
  endfunction

  task automatic expected_sig(input logic [4:0] f, output logic [SIG_W-1:0] sig);
    sig = '0;
    ref_fault = f;
    for (int k = 0; k < NPAT; k++) begin
      ref_pat = exp_pat[k];
      #1;
      sig = misr_step(sig, ref_y);
    end
  endtask

  // One BIST run with the given CUT fault; returns the verdict.
  task automatic run_bist(input logic [4:0] f, input logic [SIG_W-1:0] golden, output logic passed);
    int k = 0, cyc = 0;
    logic [1:0] last_session;
    fault = f;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);  // controller now in RUN
    last_session = session;
    while (!bist_done && cyc < 100) begin
      if (session < 2'(NS)) begin
        check(k < NPAT && cut_in == exp_pat[k], $sformatf("pattern %0d = %b", k, cut_in));
        if (k < NPAT) begin
          if (exp_set[k] != 0 && (cut_in & exp_set[k]) == exp_set[k]) n_force1++;
          if (exp_rst[k] != 0 && (cut_in & exp_rst[k]) == 0) n_force0++;
          for (int i = 0; i < N; i++)
            if ((exp_set[k][i] || exp_rst[k][i]) && dut.u_tpg.u_acc.carry[i] && dut.u_tpg.u_acc.carry[i+1])
              n_carry_pass++;
        end
        k++;
      end
      @(negedge clk);
      cyc++;
      if (session != last_session) n_session_change++;
      last_session = session;
    end
    check(k == NPAT, $sformatf("test length %0d patterns, expected %0d", k, NPAT));
    check(bist_done, "bist_done raised");
    check(signature == golden, $sformatf("signature %h expected %h", signature, golden));
    passed = bist_pass;
    bist_start = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(!bist_done, "back to idle");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SIG_W-1:0] golden, sig;
    logic passed;
    rst = 1'b1; bist_start = 1'b0; sic_en = 1'b0; sys_in = '0; fault = '0;
    ref_pat = '0; ref_fault = '0;
    predict();
    expected_sig(5'd0, golden);
    $display("fault-free signature %h", golden);
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Normal mode: the CUT sees the system inputs.
    for (int i = 0; i < 8; i++) begin
      sys_in = N'($urandom);
      @(negedge clk);
      check(cut_in == sys_in && sys_out == cut_out, "normal mode isolation");
      n_normal++;
    end

    // Fault-free run must pass.
    run_bist(5'd0, golden, passed);
    check(passed, "fault-free c17 passes");
    if (passed) n_pass++;

    // Each single stuck-at fault: the verdict must follow the reference.
    for (int f = 1; f <= 22; f++) begin
      expected_sig(5'(f), sig);
      run_bist(5'(f), sig, passed);
      check(passed == (sig == golden), $sformatf("verdict for fault %0d", f));
      if (!passed) begin n_fail++; n_detected++; end
      else n_pass++;
    end
    $display("stuck-at faults detected: %0d of 22", n_detected);

    // SIC generator beside the BIST: single input change inside a seed block.
    begin
      logic [N-1:0] prev;
      sic_en = 1'b1;
      @(negedge clk);
      prev = sic_pattern;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        if (dut.u_sic.new_seed) n_new_seed++;
        else check($countones(sic_pattern ^ prev) == 1, "SIC: one bit changes");
        prev = sic_pattern;
      end
      sic_en = 1'b0;
    end

    $display("mechanisms: force1=%0d force0=%0d carry_pass=%0d session_change=%0d pass=%0d fail=%0d normal=%0d new_seed=%0d",
             n_force1, n_force0, n_carry_pass, n_session_change, n_pass, n_fail, n_normal, n_new_seed);
    check(n_force1 > 0, "weight-1 forcing seen");
    check(n_force0 > 0, "weight-0 forcing seen");
    check(n_carry_pass > 0, "carry through forced cell seen");
    check(n_session_change > 0, "session change seen");
    check(n_pass > 0, "pass verdict seen");
    check(n_fail > 0, "fail verdict seen");
    check(n_normal > 0, "normal mode seen");
    check(n_new_seed > 0, "new SIC seed seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
