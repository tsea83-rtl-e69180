// parity32: parity of an N-bit bus (N = 32 in the lecture).
//
// pout is the XOR of all bits of x: 1 when x has an odd number of ones.
// It is pure combinational logic, written as a loop that builds a chain
// of XOR gates from the top bit down, as the lecture draws it.
module parity32 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] x,
  output logic         pout
);

  always_comb begin
    logic p;
    p = 1'b0;
    for (int i = N - 1; i >= 0; i--) p = p ^ x[i];
    pout = p;
  end

endmodule
