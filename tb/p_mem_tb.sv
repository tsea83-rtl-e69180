// p_mem_tb: checks the program memory of the microprogrammed CPU:
// 0042 at address 0, 00A0 at address 1, zero at 2..15 and zero for a
// sample of addresses beyond the table.
module p_mem_tb;
  logic [15:0] paddr, pdata;
  int checks = 0, failures = 0;

  p_mem dut (.paddr, .pdata);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input logic [15:0] a, input logic [15:0] w);
    paddr = a;
    #1;
    checks++;
    if (pdata !== w) begin
      failures++;
      $display("FAIL paddr %0d: got %04h expected %04h", a, pdata, w);
    end
  endtask

  initial begin
    expect_word(16'd0, 16'h0042);
    expect_word(16'd1, 16'h00A0);
    for (int a = 2; a < 16; a++) expect_word(16'(a), 16'h0000);
    for (int i = 0; i < 50; i++) expect_word(16'(16 + ($urandom % 65520)), 16'h0000);
    expect_word(16'hFFFF, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
