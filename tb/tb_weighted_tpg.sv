// Testbench of weighted_tpg at its defaults (5 bits, 2 sessions, 3-stage
// LFSR) and with 3 sessions on 8 bits.
// A behavioural reference predicts the pattern of every cycle from the weight
// masks alone (forced bits applied at the start of a session, free bits add
// the all-ones addend). The test checks each pattern, that each session lasts
// 2**LFSR_W-1 = 7 cycles, that done rises after exactly NUM_SESSIONS*7
// patterns and that the generator then parks at zero. It also checks the
// weighted property: in a session every weight-1 bit is 1, every weight-0 bit
// 0, and the free bits take 7 distinct values.
module tb_weighted_tpg;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, run;
  always #5 clk = ~clk;

  localparam logic [2:0][7:0] S8 = {8'b1000_0001, 8'b0000_0000, 8'b0011_0000};
  localparam logic [2:0][7:0] R8 = {8'b0100_0010, 8'b1111_0000, 8'b0000_1100};

  logic [4:0] p5; logic v5, d5; logic [1:0] ss5;
  logic [7:0] p8; logic v8, d8; logic [1:0] ss8;

  weighted_tpg dut5 (.clk, .rst, .run, .pattern(p5), .pattern_valid(v5), .session(ss5), .done(d5));
  weighted_tpg #(.N(8), .NUM_SESSIONS(3), .SET_MASK(S8), .RESET_MASK(R8)) dut8 (
    .clk, .rst, .run, .pattern(p8), .pattern_valid(v8), .session(ss8), .done(d8));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference sequence for n bits and the given masks, 7 patterns per session.
  function automatic void reference(input int n, input int ns, input logic [2:0][7:0] sm,
                                    input logic [2:0][7:0] rm, output logic [7:0] seq [21]);
    logic [7:0] msk = 8'((1 << n) - 1);
    logic [7:0] a, b, s, r, free;
    a = '0; b = msk;
    for (int ss = 0; ss < ns; ss++) begin
      s = sm[ss] & msk; r = rm[ss] & msk; free = ~(s | r) & msk;
      a = (a & ~r) | s; b = (b & ~s) | r;
      for (int p = 0; p < 7; p++) begin
        seq[ss*7+p] = a;
        a = (8'(a + b) & free & msk) | s;
        b = (msk & free) | r;
      end
    end
  endfunction

  initial begin
    logic [7:0] e5 [21], e8 [21];
    logic [2:0][7:0] s5m, r5m;
    int k;
    s5m = {8'd0, 8'b000_00010, 8'b000_00101};
    r5m = {8'd0, 8'b000_00101, 8'b000_00000};
    reference(5, 2, s5m, r5m, e5);
    reference(8, 3, S8, R8, e8);
    rst = 1; run = 0;
    repeat (2) @(negedge clk);
    check(p5 == 0 && p8 == 0, "parked during reset");
    rst = 0; run = 1;
    #1;
    for (k = 0; k < 30 && !(d5 && d8); k++) begin
      if (k < 14) begin
        check(v5 && !d5 && p5 == e5[k][4:0], $sformatf("n=5 pattern %0d = %b exp %b", k, p5, e5[k][4:0]));
        check(int'(ss5) == k / 7, "n=5 session number");
      end else check(d5 && !v5 && p5 == 0, "n=5 done and parked");
      if (k < 21) begin
        check(v8 && !d8 && p8 == e8[k], $sformatf("n=8 pattern %0d = %b exp %b", k, p8, e8[k]));
      end else check(d8 && !v8, "n=8 done");
      @(negedge clk);
    end
    check(k == 21, $sformatf("n=8 done after %0d cycles, expected 21", k));
    // weighted property of the default c17 assignment
    for (int ss = 0; ss < 2; ss++) begin
      bit seen [8];
      int distinct;
      distinct = 0;
      foreach (seen[i]) seen[i] = 0;
      for (int p = 0; p < 7; p++) begin
        logic [4:0] v;
        logic [2:0] fr;
        v = e5[ss*7+p][4:0];
        if (ss == 0) begin
          check(v[2] == 1 && v[0] == 1, "S1 weight-1 bits");
          fr = {v[4], v[3], v[1]};
        end else begin
          check(v[2] == 0 && v[1] == 1 && v[0] == 0, "S2 weight-0/1 bits");
          fr = {1'b0, v[4], v[3]};
        end
        if (!seen[fr]) distinct++;
        seen[fr] = 1;
      end
      check(distinct == (ss == 0 ? 7 : 4), $sformatf("session %0d free bit values %0d", ss, distinct));
    end
    // every vector of the deterministic c17 test set (T1..T4) is produced,
    // T1 and T4 in session 0, T2 and T3 in session 1
    begin
      logic [4:0] tv [4];
      int sess [4];
      tv = '{5'b00101, 5'b01010, 5'b10010, 5'b11111};
      sess = '{0, 1, 1, 0};
      for (int v = 0; v < 4; v++) begin
        bit found;
        found = 0;
        for (int p = 0; p < 7; p++) if (e5[sess[v]*7+p][4:0] == tv[v]) found = 1;
        check(found, $sformatf("test vector T%0d produced", v + 1));
      end
    end
    // run low parks the generator
    run = 0; #1;
    check(p5 == 0, "parked when run low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
