// Exhaustive testbench of full_adder against its printed truth table
// (rows ordered cin, a, b as binary 000..111).
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .cin, .s, .cout);

  // {cin, a, b} -> {s, cout}
  localparam logic [1:0] TABLE [8] = '{2'b00, 2'b10, 2'b10, 2'b01, 2'b10, 2'b01, 2'b01, 2'b11};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int row = 0; row < 8; row++) begin
      {cin, a, b} = 3'(row);
      #1;
      checks++;
      if ({s, cout} != TABLE[row]) begin
        failures++;
        $display("FAIL row %0d: s=%b cout=%b", row + 1, s, cout);
      end
      // carry passes through whenever the operands differ
      if (a != b) begin
        checks++;
        if (cout != cin) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
