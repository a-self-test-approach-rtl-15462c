// Testbench of weighted_accumulator with random weight assignments.
// For each assignment (disjoint Set and Reset masks) and random addend, it
// checks that forced bits hold their value, that the free bits taken
// together count as an accumulator of the free addend bits (forced bits are
// transparent to the carry), and the carry out. Run at N=5 and N=12.
module tb_weighted_accumulator;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gather the bits of x selected by m into the low bits
  function automatic longint unsigned pext(input longint unsigned x, input longint unsigned m, input int n);
    longint unsigned r = 0;
    int j = 0;
    for (int i = 0; i < n; i++) if (m[i]) begin r[j] = x[i]; j++; end
    return r;
  endfunction

  logic [11:0] set_m, rst_m, addend, a, b;
  logic        cout, wide;
  logic [4:0]  a5, b5;
  logic [11:0] a12, b12;
  logic        c5, c12;

  weighted_accumulator dut5 (
    .clk, .set_mask(set_m[4:0]), .reset_mask(rst_m[4:0]), .addend(addend[4:0]), .cin(1'b0),
    .a(a5), .b(b5), .cout(c5)
  );

  weighted_accumulator #(.N(12)) dut12 (
    .clk, .set_mask(set_m), .reset_mask(rst_m), .addend(addend), .cin(1'b0),
    .a(a12), .b(b12), .cout(c12)
  );

  assign a    = wide ? a12 : {7'd0, a5};
  assign b    = wide ? b12 : {7'd0, b5};
  assign cout = wide ? c12 : c5;

  task automatic run(input int n);
    longint unsigned msk = (64'd1 << n) - 1;
    for (int t = 0; t < 60; t++) begin
      logic [11:0] s, r, free;
      longint unsigned fa, fb, k, expa;
      s = 12'($urandom) & 12'(msk);
      r = 12'($urandom) & ~s & 12'(msk);
      if (t % 4 == 0) begin s = '0; r = '0; end
      free = ~(s | r) & 12'(msk);
      @(negedge clk);
      set_m = s; rst_m = r; addend = 12'($urandom) & 12'(msk);
      #1;
      checks++;
      if ((a & s) != s || (a & r) != 0 || (b & s) != 0 || (b & r) != r) begin
        failures++; $display("FAIL forcing n=%0d", n);
      end
      @(posedge clk);   // B loads the addend
      for (int c = 0; c < 6; c++) begin
        @(negedge clk);
        k = longint'($countones(free));
        fa = pext(a, free, n); fb = pext(b, free, n);
        checks++;
        if (pext(b, free, n) != pext(addend, free, n)) begin failures++; $display("FAIL B n=%0d", n); end
        checks++;
        if (cout != (((longint'(a) + longint'(b)) >> n) & 1)) begin failures++; $display("FAIL cout n=%0d", n); end
        expa = (fa + fb) & ((64'd1 << k) - 1);
        @(posedge clk); #1;
        checks++;
        if (pext(a, free, n) != expa || (a & s) != s || (a & r) != 0) begin
          failures++; $display("FAIL accumulate n=%0d a=%b", n, a);
        end
      end
    end
  endtask

  initial begin
    set_m = '0; rst_m = '1; addend = '0;
    wide = 1'b0;
    run(5);
    wide = 1'b1;
    run(12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
