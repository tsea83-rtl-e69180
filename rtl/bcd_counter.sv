// bcd_counter: decade counter 0..9 with a synchronous, active-low clear.
//
// At each rising edge q becomes 0 when clear_n is 0 or when q is 9, and
// q + 1 otherwise, so with clear_n held high it counts 0,1,...,9,0,...
// qout is q. The structure (a "=9?" compare OR'ed with the inverted clear
// selecting 0 into the register, else the incrementer) is the lecture's.
module bcd_counter (
  input  logic       clk,
  input  logic       clear_n,
  output logic [3:0] qout
);

  logic [3:0] q;
  logic       load_zero;

  assign load_zero = !clear_n || (q == 4'd9);

  always_ff @(posedge clk) begin
    if (load_zero) q <= 4'd0;
    else           q <= q + 4'd1;
  end

  assign qout = q;

endmodule
