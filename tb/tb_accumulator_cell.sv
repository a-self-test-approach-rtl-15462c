// Testbench of accumulator_cell: the three configurations of the cell.
// Weight 1 (set) and weight 0 (reset) must force A and B asynchronously to
// complementary values and pass cin to cout; with neither, the cell must load
// B from b_d and A with the sum bit on the clock edge.
module tb_accumulator_cell;
  logic clk = 1'b0;
  logic set_i, reset_i, b_d, cin, cout, a_q, b_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  accumulator_cell dut (.clk, .set_i, .reset_i, .b_d, .cin, .cout, .a_q, .b_q);

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

  initial begin
    logic ea, eb;
    set_i = 0; reset_i = 0; b_d = 0; cin = 0;
    #1;
    reset_i = 1;   // rising edge: asynchronous action
    #1;
    check(a_q == 0 && b_q == 1, "reset forces A=0 B=1 at once");
    for (int k = 0; k < 2; k++) begin
      cin = k[0]; #1;
      check(cout == cin, "weight 0: cout follows cin");
    end
    @(negedge clk);
    check(a_q == 0 && b_q == 1, "weight 0 held across a clock");
    // weight 1, applied between clock edges
    reset_i = 0; set_i = 1; #1;
    check(a_q == 1 && b_q == 0, "set forces A=1 B=0 at once");
    for (int k = 0; k < 2; k++) begin
      cin = k[0]; #1;
      check(cout == cin, "weight 1: cout follows cin");
      @(negedge clk);
      check(a_q == 1 && b_q == 0, "weight 1 held across a clock");
    end
    // free running: random b_d and cin
    set_i = 0;
    ea = a_q; eb = b_q;
    for (int i = 0; i < 200; i++) begin
      b_d = 1'($urandom); cin = 1'($urandom);
      #1;
      check(cout == ((ea & eb) | (cin & (ea ^ eb))), "free: carry");
      @(posedge clk); #1;
      ea = ea ^ eb ^ cin; eb = b_d;
      check(a_q == ea && b_q == eb, "free: A gets sum, B gets b_d");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
