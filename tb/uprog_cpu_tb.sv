// uprog_cpu_tb: runs the microprogrammed CPU from reset and checks the
// fetch phase cycle by cycle against hand-derived values. Each
// instruction takes two cycles: after edge 2k+1 uPC = 1 and ASR = k; after
// edge 2k uPC = 0, IR = PM[k-1] and PC = k. The program memory holds 0042,
// 00A0 and then zeros. The data bus must show PC in the first microcycle
// and PM[ASR] in the second.
module uprog_cpu_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] pc, ir, asr, data_bus;
  logic [5:0]  upc;
  int checks = 0, failures = 0;
  int fetches = 0;
  int k;

  uprog_cpu dut (.clk, .rst, .pc, .ir, .asr, .upc, .data_bus);

  always #5 clk = ~clk;

  function automatic logic [15:0] pm_word(input int a);
    return (a == 0) ? 16'h0042 : (a == 1) ? 16'h00A0 : 16'h0000;
  endfunction

  task automatic check(input bit cond, input string what, input int n);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL edge %0d: %s (upc=%0d pc=%0d asr=%0d ir=%04h bus=%04h)",
               n, what, upc, pc, asr, ir, data_bus);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check(upc == 0 && pc == 0 && ir == 0 && asr == 0, "reset state", 0);
    check(data_bus == 16'd0, "bus carries PC in microcycle 0", 0);
    rst = 1'b0;
    for (int n = 1; n <= 60; n++) begin
      @(posedge clk);
      #1;
      k = n / 2;
      if (n % 2 == 1) begin
        check(upc == 6'd1, "uPC steps to 1", n);
        check(asr == 16'(k), "ASR := PC", n);
        check(pc == 16'(k), "PC held", n);
        check(data_bus == pm_word(k), "bus carries PM[ASR]", n);
      end else begin
        check(upc == 6'd0, "uPC jumps to uAddr 0", n);
        check(ir == pm_word(k - 1), "IR := PM", n);
        check(pc == 16'(k), "PC incremented", n);
        check(data_bus == pc, "bus carries PC", n);
        fetches++;
      end
    end
    check(fetches == 30, "fetch count", fetches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
