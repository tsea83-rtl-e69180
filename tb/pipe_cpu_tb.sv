// pipe_cpu_tb: runs the pipelined CPU front end on its built-in program
//   0: D1  1: D2  2: J 0  3: D3  4: D4
// and checks, edge by edge after reset, the values worked out by hand:
// the loop is five cycles long, PC after edge n is n mod 5, and IR2 holds
// D1, D2, J, D3 (delay slot), NOP (squashed D4), D1, ... from edge 2 on.
// It also checks PC1, PC2 at the jump (target 0) and that D4 never
// reaches IR2. A mid-run reset is applied and the sequence re-checked.
module pipe_cpu_tb;
  import pipe_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] pc, pc1, pc2;
  instr_t ir1, ir2;
  int checks = 0, failures = 0;
  int jumps = 0, squashed = 0;

  pipe_cpu dut (.clk, .rst, .pc, .pc1, .pc2, .ir1, .ir2);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what, input int n);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL edge %0d: %s (pc=%0d pc1=%0d pc2=%0d ir1.op=%0d ir2.op=%0d)",
               n, what, pc, pc1, pc2, ir1.op, ir2.op);
    end
  endtask

  // expected opcode in IR2 after edge n (n >= 1)
  function automatic opcode_e exp_ir2(input int n);
    opcode_e seq [5] = '{OP_D1, OP_D2, OP_J, OP_D3, OP_NOP};
    if (n < 2) return OP_NOP;
    return seq[(n - 2) % 5];
  endfunction

  task automatic run(input int edges);
    for (int n = 1; n <= edges; n++) begin
      @(posedge clk);
      #1;
      check(pc == 16'(n % 5), "pc", n);
      check(ir2.op == exp_ir2(n), "ir2 opcode", n);
      check(ir2.op != OP_D4, "squashed instruction reached IR2", n);
      if (n >= 2) check(pc1 == 16'((n - 1) % 5), "pc1", n);
      if (ir2.op == OP_J) begin
        jumps++;
        check(pc2 == 16'd0, "jump target", n);
      end
      check((ir1.op == OP_NOP) == ((n % 5) == 0), "NOP injected into IR1", n);
      if (ir1.op == OP_NOP) squashed++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check(pc == 0 && ir1 == '0 && ir2 == '0, "reset state", 0);
    rst = 1'b0;
    run(52);
    // reset in the middle of the loop
    rst = 1'b1;
    @(posedge clk);
    #1;
    check(pc == 0 && ir1.op == OP_NOP && ir2.op == OP_NOP, "mid-run reset", 0);
    rst = 1'b0;
    run(23);
    check(jumps == 10 + 4, "number of jumps", jumps);
    check(squashed == 10 + 4, "number of squashed fetches", squashed);
    $display("jumps=%0d squashed=%0d", jumps, squashed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
