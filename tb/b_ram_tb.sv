// b_ram_tb: random traffic on both ports of the block RAM against a model.
// Expected behaviour: at each edge data_outN takes the word at addrN as it
// was before the edge (read-first, one cycle latency), writes take effect
// at the edge, and when both ports write one address port 2's data stays.
// Addresses are drawn from a small range part of the time so that
// read-during-write and write-write collisions happen; both are counted
// and must occur. Power-up contents (1F at address 0) are checked first.
module b_ram_tb;
  logic clk = 1'b0;
  logic we1, we2;
  logic [10:0] addr1, addr2;
  logic [7:0]  data_in1, data_in2, data_out1, data_out2;
  logic [7:0]  model [2048];
  int checks = 0, failures = 0;
  int rdw = 0, ww = 0;

  b_ram dut (.clk, .we1, .data_in1, .data_out1, .addr1, .we2, .data_in2, .data_out2, .addr2);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 2048; a++) model[a] = (a == 0) ? 8'h1F : 8'h00;
    we1 = 0; we2 = 0; data_in1 = 0; data_in2 = 0;
    // power-up contents through both ports
    for (int a = 0; a < 2048; a += 2) begin
      @(negedge clk);
      addr1 = 11'(a); addr2 = 11'(a + 1);
      @(posedge clk);
      #1;
      check(data_out1, model[a], "init port 1");
      check(data_out2, model[a + 1], "init port 2");
    end
    for (int n = 0; n < 6000; n++) begin
      logic [7:0] e1, e2;
      @(negedge clk);
      we1 = 1'($urandom); we2 = 1'($urandom);
      addr1 = (n % 2) ? 11'($urandom % 8) : 11'($urandom);
      addr2 = (n % 2) ? 11'($urandom % 8) : 11'($urandom);
      data_in1 = 8'($urandom); data_in2 = 8'($urandom);
      e1 = model[addr1];
      e2 = model[addr2];
      if ((we1 || we2) && addr1 == addr2) rdw++;
      if (we1 && we2 && addr1 == addr2) ww++;
      @(posedge clk);
      if (we1) model[addr1] = data_in1;
      if (we2) model[addr2] = data_in2;
      #1;
      check(data_out1, e1, "port 1 read");
      check(data_out2, e2, "port 2 read");
    end
    // read back a collision address through port 1 after a quiet cycle
    @(negedge clk);
    we1 = 0; we2 = 0;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      addr1 = 11'(a);
      @(posedge clk);
      #1;
      check(data_out1, model[a], "final readback");
    end
    checks++;
    if (rdw == 0 || ww == 0) begin
      failures++;
      $display("FAIL: collisions not exercised rdw=%0d ww=%0d", rdw, ww);
    end
    $display("same-address cycles=%0d write-write=%0d", rdw, ww);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
