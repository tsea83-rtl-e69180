// pulse_counter: counts events on an asynchronous input, once per rising
// edge however long the input stays high.
//
// x passes two flip-flops, a and b, clocked by clk. a synchronises x to
// the clock; b is a one-cycle-old copy of a. ep = a AND NOT b is 1 for
// exactly one clock cycle after x has gone from 0 to 1 (a single pulse),
// and enables the counter, which steps q by one at the end of that cycle.
// Timing: x rises; at the next edge a rises and ep goes high; at the edge
// after that b rises, ep falls and q increments.
// The synchroniser, one-pulser and counter enable are the lecture's. The
// counter width and the synchronous, active-high reset are this design's
// choice.
module pulse_counter #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             x,
  output logic             ep,
  output logic [CNT_W-1:0] q
);

  logic a, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= 1'b0;
      b <= 1'b0;
    end else begin
      a <= x;
      b <= a;
    end
  end

  assign ep = a & ~b;

  // a one-pulse never lasts two cycles
  a_single_pulse: assert property (@(posedge clk) disable iff (rst) ep |=> !ep)
    else $error("ep high for more than one cycle");

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ep) q <= q + 1'b1;
  end

endmodule
