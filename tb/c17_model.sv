// Behavioural model of the ISCAS-85 c17 benchmark (six 2-input NAND gates),
// the circuit under test of the end-to-end testbench. Not part of the design.
//
// Input order a[4:0] = {N1, N2, N3, N6, N7}; outputs y[1:0] = {N22, N23}.
// `fault` selects one single stuck-at fault for coverage experiments:
// 0 = fault-free; 1..22 = net k-th of the eleven nets stuck-at-0 (odd) or
// stuck-at-1 (even), nets ordered N1,N2,N3,N6,N7,N10,N11,N16,N19,N22,N23.
module c17_model (
  input  logic [4:0] a,
  input  logic [4:0] fault,
  output logic [1:0] y
);

  function automatic logic inj(input logic v, input int unsigned net, input logic [4:0] f);
    if (f != 0 && ((int'(f) - 1) / 2) == int'(net)) return ((int'(f) - 1) % 2 == 1);
    return v;
  endfunction

  always_comb begin
    logic n1, n2, n3, n6, n7, n10, n11, n16, n19, n22, n23;
    n1  = inj(a[4], 0, fault);
    n2  = inj(a[3], 1, fault);
    n3  = inj(a[2], 2, fault);
    n6  = inj(a[1], 3, fault);
    n7  = inj(a[0], 4, fault);
    n10 = inj(~(n1 & n3), 5, fault);
    n11 = inj(~(n3 & n6), 6, fault);
    n16 = inj(~(n2 & n11), 7, fault);
    n19 = inj(~(n11 & n7), 8, fault);
    n22 = inj(~(n10 & n16), 9, fault);
    n23 = inj(~(n16 & n19), 10, fault);
    y   = {n22, n23};
  end

endmodule
