// pipe_pm_tb: checks the program memory of the pipelined CPU against the
// expected test program (four placeholder instructions around J 0 at
// address 2) and that every other word reads as NOP (zero).
module pipe_pm_tb;
  logic [8:0]  addr;
  logic [31:0] data;
  int checks = 0, failures = 0;

  pipe_pm dut (.addr(addr), .data_out(data));

  task automatic expect_word(input int a, input logic [31:0] w);
    addr = 9'(a);
    #1;
    checks++;
    if (data !== w) begin
      failures++;
      $display("FAIL addr %0d: got %08h expected %08h", a, data, w);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_word(0, 32'h0400_0000);
    expect_word(1, 32'h0800_0000);
    expect_word(2, 32'h5400_07FE);
    expect_word(3, 32'h0C00_0000);
    expect_word(4, 32'h1000_0000);
    for (int a = 5; a < 512; a++) expect_word(a, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
