// D flip-flop with asynchronous, active-high set and reset.
//
// This is the storage element of both accumulator registers. While set or
// reset is high the output is forced at once, whatever the clock does; when
// both are low, q takes d on the rising clock edge. If both are high, reset
// wins (the generator never drives both).
module sr_dff (
  input  logic clk,
  input  logic set,
  input  logic rst,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge set or posedge rst) begin
    if (rst)      q <= 1'b0;
    else if (set) q <= 1'b1;
    else          q <= d;
  end

endmodule
