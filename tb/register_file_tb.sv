// register_file_tb: random traffic on the 3-port register file against a
// reference model kept in the testbench. Each cycle it sets random read
// addresses, read flags and a random write; before the clock edge it
// checks alu_a/alu_b against the model (data_w when the port reads the
// register being written with its flag set, else the stored value), then
// updates the model at the edge. Bypass hits on both ports are counted and
// must occur.
module register_file_tb;
  logic clk = 1'b0;
  logic r_a, r_b, w_d;
  logic [1:0] addr_a, addr_b, addr_w;
  logic [7:0] data_w, alu_a, alu_b;
  logic [7:0] model [4];
  int checks = 0, failures = 0;
  int bypass_a = 0, bypass_b = 0, nobypass_flag = 0;

  register_file dut (.clk, .r_a, .r_b, .addr_a, .addr_b, .w_d, .addr_w, .data_w, .alu_a, .alu_b);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_a = 0; r_b = 0;
    addr_a = 0; addr_b = 0;
    // fill every register first
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      w_d = 1; addr_w = 2'(i); data_w = 8'($urandom);
      @(posedge clk);
      model[i] = data_w;
    end
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] ea, eb;
      @(negedge clk);
      r_a = 1'($urandom); r_b = 1'($urandom);
      addr_a = 2'($urandom); addr_b = 2'($urandom);
      w_d = 1'($urandom); addr_w = 2'($urandom); data_w = 8'($urandom);
      #1;
      ea = (w_d && r_a && addr_a == addr_w) ? data_w : model[addr_a];
      eb = (w_d && r_b && addr_b == addr_w) ? data_w : model[addr_b];
      if (w_d && r_a && addr_a == addr_w) bypass_a++;
      if (w_d && r_b && addr_b == addr_w) bypass_b++;
      if (w_d && !r_a && addr_a == addr_w && data_w != model[addr_a]) nobypass_flag++;
      checks++;
      if (alu_a !== ea) begin
        failures++;
        $display("FAIL alu_a: got %02h expected %02h", alu_a, ea);
      end
      checks++;
      if (alu_b !== eb) begin
        failures++;
        $display("FAIL alu_b: got %02h expected %02h", alu_b, eb);
      end
      @(posedge clk);
      if (w_d) model[addr_w] = data_w;
    end
    checks++;
    if (bypass_a == 0 || bypass_b == 0 || nobypass_flag == 0) begin
      failures++;
      $display("FAIL: mechanism not exercised (bypass_a=%0d bypass_b=%0d no-flag=%0d)",
               bypass_a, bypass_b, nobypass_flag);
    end
    $display("bypass_a=%0d bypass_b=%0d", bypass_a, bypass_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
