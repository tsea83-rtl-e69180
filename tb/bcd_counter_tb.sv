// bcd_counter_tb: drives the decade counter with a random active-low
// clear and compares qout every cycle with a model: 0 after a clear or
// after 9, else the previous value plus one. Wraps from 9 and clears are
// counted and must occur.
module bcd_counter_tb;
  logic clk = 1'b0, clear_n;
  logic [3:0] qout;
  int exp_q;
  int checks = 0, failures = 0, wraps = 0, clears = 0;

  bcd_counter dut (.clk, .clear_n, .qout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear_n = 0;
    @(posedge clk);
    exp_q = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      clear_n = ($urandom % 25) != 0;
      @(posedge clk);
      if (!clear_n) begin exp_q = 0; clears++; end
      else if (exp_q == 9) begin exp_q = 0; wraps++; end
      else exp_q = exp_q + 1;
      #1;
      checks++;
      if (qout !== 4'(exp_q)) begin
        failures++;
        $display("FAIL cycle %0d: got %0d expected %0d", n, qout, exp_q);
      end
    end
    checks++;
    if (wraps == 0 || clears == 0) begin
      failures++;
      $display("FAIL: wraps=%0d clears=%0d", wraps, clears);
    end
    $display("wraps=%0d clears=%0d", wraps, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
