// pulse_counter_tb: feeds the synchroniser/one-pulser a random input that
// changes between clock edges and stays at each level for 1 to 6 cycles.
// Checks: ep rises exactly one edge after x rises and is high for exactly
// one cycle, ep never rises otherwise, q steps by one at the end of each
// pulse and finally equals the number of rising edges of x.
module pulse_counter_tb;
  logic clk = 1'b0, rst = 1'b1, x = 1'b0;
  logic ep;
  logic [7:0] q;
  int checks = 0, failures = 0;
  int rises = 0, pulses = 0;
  int len;
  logic x_at_prev_edge, x_at_edge;

  pulse_counter dut (.clk, .rst, .x, .ep, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s (x=%b ep=%b q=%0d)", $time, what, x, ep, q);
    end
  endtask

  // stimulus: x changes at the falling edge, levels last 1..6 cycles
  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 600; n++) begin
      len = 1 + ($urandom % 6);
      @(negedge clk);
      x = ~x;
      if (x) rises++;
      repeat (len - 1) @(negedge clk);
    end
    @(negedge clk);
    x = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    check(q == 8'(rises), "final count equals rising edges of x");
    check(pulses == rises, "one pulse per rising edge");
    $display("rises=%0d pulses=%0d q=%0d", rises, pulses, q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: sample x at each edge; ep after edge k must equal
  // x(edge k) & !x(edge k-1); q must step when ep was high
  initial begin
    logic [7:0] q_prev;
    logic ep_prev;
    x_at_prev_edge = 1'b0;
    x_at_edge = 1'b0;
    ep_prev = 1'b0;
    q_prev = '0;
    @(negedge rst);
    forever begin
      @(posedge clk);
      x_at_prev_edge = x_at_edge;
      x_at_edge = x;
      #1;
      check(ep == (x_at_edge & ~x_at_prev_edge), "ep timing");
      check(q == q_prev + 8'(ep_prev), "q steps at end of pulse");
      if (ep) pulses++;
      ep_prev = ep;
      q_prev = q;
    end
  end
endmodule
