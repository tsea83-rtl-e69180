// u_mem_tb: reads every micro address and compares with the fetch
// microprogram written out bit by bit as ALU_TB_FB_PC_uPC_uAddr:
//   0: 00_011_100_0_0_000000   (ASR := PC)
//   1: 00_010_001_1_1_000000   (IR := PM, PC := PC + 1, uPC := 0)
// All other addresses, including 16..63 beyond the table, read zero.
module u_mem_tb;
  logic [5:0]  uaddr;
  logic [15:0] udata;
  int checks = 0, failures = 0;

  u_mem dut (.uaddr, .udata);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      logic [15:0] exp;
      exp = (a == 0) ? 16'b00_011_100_0_0_000000 :
            (a == 1) ? 16'b00_010_001_1_1_000000 : 16'h0000;
      uaddr = 6'(a);
      #1;
      checks++;
      if (udata !== exp) begin
        failures++;
        $display("FAIL uaddr %0d: got %b expected %b", a, udata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
