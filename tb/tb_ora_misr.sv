// Testbench of ora_misr. The reference treats the signature as a polynomial
// over GF(2): each step multiplies by x, adds the input word and reduces
// modulo x^8+x^4+x^3+x^2+1. Checks the signature after random streams, that
// en low holds it, that init clears it, and the golden comparison.
module tb_ora_misr;
  int checks = 0, failures = 0;
  logic clk = 1'b0, init, en;
  logic [1:0] data_in;
  logic [7:0] golden, signature;
  logic match;
  always #5 clk = ~clk;
  ora_misr dut (.clk, .init, .en, .data_in, .golden, .signature, .match);

  function automatic logic [7:0] reduce(input logic [15:0] p);
    for (int i = 15; i >= 8; i--) if (p[i]) p = p ^ (16'h11D << (i - 8));
    return p[7:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ref_sig;
    for (int run = 0; run < 5; run++) begin
      init = 1; en = 0; data_in = 0; golden = 0;
      @(negedge clk);
      init = 0;
      ref_sig = 0;
      checks++; if (signature != 0) failures++;
      for (int c = 0; c < 40; c++) begin
        en = 1'($urandom); data_in = 2'($urandom);
        @(negedge clk);
        if (en) ref_sig = reduce({7'd0, ref_sig, 1'b0} ^ 16'(data_in));
        checks++;
        if (signature != ref_sig) begin failures++; $display("FAIL run %0d cycle %0d", run, c); end
      end
      en = 0;
      golden = ref_sig; #1;
      checks++; if (!match) failures++;
      golden = ref_sig ^ 8'h01; #1;
      checks++; if (match) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
