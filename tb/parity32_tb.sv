// parity32_tb: compares pout with the number of ones in x (odd -> 1) for
// corner values, every single-bit word and random words.
module parity32_tb;
  logic [31:0] x;
  logic pout;
  int checks = 0, failures = 0;

  parity32 dut (.x, .pout);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [31:0] v);
    x = v;
    #1;
    checks++;
    if (pout !== 1'($countones(v) % 2)) begin
      failures++;
      $display("FAIL x=%08h: got %b", v, pout);
    end
  endtask

  initial begin
    try(32'h0000_0000);
    try(32'hFFFF_FFFF);
    try(32'h8000_0001);
    try(32'h7FFF_FFFF);
    for (int i = 0; i < 32; i++) try(32'h1 << i);
    for (int i = 0; i < 3000; i++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
