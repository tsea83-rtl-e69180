// l_ram_tb: checks the power-up contents of the LUT RAM (1F at address 0,
// zero elsewhere), then random writes and reads against a model. The read
// is combinational: data_out follows addr within the cycle, and a written
// word shows up right after the clock edge that writes it.
module l_ram_tb;
  logic clk = 1'b0, we;
  logic [10:0] addr;
  logic [7:0]  data_in, data_out;
  logic [7:0]  model [2048];
  int checks = 0, failures = 0;

  l_ram dut (.clk, .we, .data_in, .data_out, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (data_out !== exp) begin
      failures++;
      $display("FAIL %s addr %0d: got %02h expected %02h", what, addr, data_out, exp);
    end
  endtask

  initial begin
    we = 0; data_in = 0;
    for (int a = 0; a < 2048; a++) begin
      model[a] = (a == 0) ? 8'h1F : 8'h00;
      addr = 11'(a);
      #1;
      check(model[a], "init");
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr = (n % 3 == 0) ? 11'($urandom % 16) : 11'($urandom);
      data_in = 8'($urandom);
      #1;
      check(model[addr], "read before edge");
      @(posedge clk);
      if (we) model[addr] = data_in;
      #1;
      check(model[addr], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
