// fo10_top_tb: end-to-end run of every design in fo10_top at its default
// size, all on the shared clock at once. For each design it keeps an
// independent model and checks the outputs every cycle:
//   pipelined CPU   PC, IR2 opcode sequence, jump target, NOP injection
//   micro CPU       two-cycle fetch: ASR := PC, IR := PM, PC := PC + 1
//   register file   read ports incl. write-through bypass
//   LUT RAM         combinational read, clocked write
//   block RAM       registered read-first, port 2 wins a write clash
//   decade counter  0..9 wrap and active-low clear
//   parity          $countones of a random word
//   pulse counter   one pulse per rising edge of an unsynchronised input
//   hazard mux      select switching with both data inputs high
// Every mechanism is counted, and one that never happened is a failure.
module fo10_top_tb;
  import pipe_pkg::*;

  localparam int CYCLES = 3000;

  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] pipe_pc, pipe_pc1, pipe_pc2;
  instr_t      pipe_ir1, pipe_ir2;
  logic [15:0] uprog_pc, uprog_ir, uprog_asr, uprog_bus;
  logic [5:0]  uprog_upc;
  logic        rf_r_a, rf_r_b, rf_w_d;
  logic [1:0]  rf_addr_a, rf_addr_b, rf_addr_w;
  logic [7:0]  rf_data_w, rf_alu_a, rf_alu_b;
  logic        lram_we;
  logic [10:0] lram_addr;
  logic [7:0]  lram_data_in, lram_data_out;
  logic        bram_we1, bram_we2;
  logic [10:0] bram_addr1, bram_addr2;
  logic [7:0]  bram_data_in1, bram_data_in2, bram_data_out1, bram_data_out2;
  logic        cnt_clear_n;
  logic [3:0]  cnt_q;
  logic [31:0] par_x;
  logic        par_out;
  logic        pc_x, pc_ep;
  logic [7:0]  pc_q;
  logic        hz_x, hz_y, hz_z, hz_f;

  fo10_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_jump = 0, n_squash = 0, n_delay_slot = 0;
  int n_fetch = 0;
  int n_byp_a = 0, n_byp_b = 0;
  int n_lram_wr = 0;
  int n_bram_rdw = 0, n_bram_ww = 0;
  int n_cnt_wrap = 0, n_cnt_clear = 0;
  int n_par_odd = 0, n_par_even = 0;
  int n_pulse = 0;
  int n_hz_switch = 0;

  // models
  logic [7:0] rf_m [4];
  logic [7:0] lram_m [2048];
  logic [7:0] bram_m [2048];
  int cnt_m;
  logic pcx_prev, pcx_now;
  logic [7:0] e_b1, e_b2;
  int k;

  task automatic check(input bit cond, input string what, input int n);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", n, what);
    end
  endtask

  function automatic opcode_e exp_ir2(input int n);
    opcode_e seq [5] = '{OP_D1, OP_D2, OP_J, OP_D3, OP_NOP};
    if (n < 2) return OP_NOP;
    return seq[(n - 2) % 5];
  endfunction

  function automatic logic [15:0] pm_word(input int a);
    return (a == 0) ? 16'h0042 : (a == 1) ? 16'h00A0 : 16'h0000;
  endfunction

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2048; a++) begin
      lram_m[a] = (a == 0) ? 8'h1F : 8'h00;
      bram_m[a] = lram_m[a];
    end
    rf_r_a = 0; rf_r_b = 0; rf_w_d = 0; rf_addr_a = 0; rf_addr_b = 0; rf_addr_w = 0; rf_data_w = 0;
    lram_we = 0; lram_addr = 0; lram_data_in = 0;
    bram_we1 = 0; bram_we2 = 0; bram_addr1 = 0; bram_addr2 = 0; bram_data_in1 = 0; bram_data_in2 = 0;
    cnt_clear_n = 0; par_x = 0; pc_x = 0; hz_x = 0; hz_y = 0; hz_z = 0;
    pcx_prev = 0; pcx_now = 0;
    repeat (3) @(posedge clk);
    // after reset: counter cleared by clear_n = 0, CPUs in reset state
    #1;
    check(pipe_pc == 0 && pipe_ir2 == '0, "pipe reset", 0);
    check(uprog_upc == 0 && uprog_pc == 0, "uprog reset", 0);
    check(lram_data_out == 8'h1F, "lram power-up word", 0);
    cnt_m = 0;
    // fill the register file
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      rf_w_d = 1; rf_addr_w = 2'(i); rf_data_w = 8'(8'h10 * i + 1);
      @(posedge clk);
      rf_m[i] = rf_data_w;
    end
    @(negedge clk);
    rst = 0;
    for (int n = 1; n <= CYCLES; n++) begin
      logic [7:0] ea, eb;
      // ---- drive inputs between edges
      rf_r_a = 1'($urandom); rf_r_b = 1'($urandom);
      rf_addr_a = 2'($urandom); rf_addr_b = 2'($urandom);
      rf_w_d = 1'($urandom); rf_addr_w = 2'($urandom); rf_data_w = 8'($urandom);
      lram_we = 1'($urandom); lram_addr = 11'($urandom % 64); lram_data_in = 8'($urandom);
      bram_we1 = 1'($urandom); bram_we2 = 1'($urandom);
      bram_addr1 = 11'($urandom % 16); bram_addr2 = 11'($urandom % 16);
      bram_data_in1 = 8'($urandom); bram_data_in2 = 8'($urandom);
      cnt_clear_n = ($urandom % 30) != 0;
      par_x = $urandom;
      if ($urandom % 3 == 0) pc_x = ~pc_x;
      hz_y = 1'($urandom); hz_z = 1'($urandom);
      if (hz_y && hz_z) n_hz_switch++;
      hz_x = ~hz_x;
      #1;
      // ---- combinational checks before the edge
      ea = (rf_w_d && rf_r_a && rf_addr_a == rf_addr_w) ? rf_data_w : rf_m[rf_addr_a];
      eb = (rf_w_d && rf_r_b && rf_addr_b == rf_addr_w) ? rf_data_w : rf_m[rf_addr_b];
      if (rf_w_d && rf_r_a && rf_addr_a == rf_addr_w) n_byp_a++;
      if (rf_w_d && rf_r_b && rf_addr_b == rf_addr_w) n_byp_b++;
      check(rf_alu_a == ea, "register file port A", n);
      check(rf_alu_b == eb, "register file port B", n);
      check(lram_data_out == lram_m[lram_addr], "lram read", n);
      check(par_out == 1'($countones(par_x) % 2), "parity", n);
      if ($countones(par_x) % 2) n_par_odd++; else n_par_even++;
      check(hz_f == (hz_x ? hz_y : hz_z), "hazard-free mux", n);
      e_b1 = bram_m[bram_addr1];
      e_b2 = bram_m[bram_addr2];
      if ((bram_we1 || bram_we2) && bram_addr1 == bram_addr2) n_bram_rdw++;
      if (bram_we1 && bram_we2 && bram_addr1 == bram_addr2) n_bram_ww++;
      // ---- clock edge, then model updates
      @(posedge clk);
      pcx_prev = pcx_now;
      pcx_now = pc_x;
      if (rf_w_d) rf_m[rf_addr_w] = rf_data_w;
      if (lram_we) begin lram_m[lram_addr] = lram_data_in; n_lram_wr++; end
      if (bram_we1) bram_m[bram_addr1] = bram_data_in1;
      if (bram_we2) bram_m[bram_addr2] = bram_data_in2;
      if (!cnt_clear_n) begin cnt_m = 0; n_cnt_clear++; end
      else if (cnt_m == 9) begin cnt_m = 0; n_cnt_wrap++; end
      else cnt_m++;
      #1;
      // ---- registered checks after the edge
      check(pipe_pc == 16'(n % 5), "pipe PC", n);
      check(pipe_ir2.op == exp_ir2(n), "pipe IR2", n);
      check((pipe_ir1.op == OP_NOP) == (n % 5 == 0), "pipe NOP injection", n);
      if (pipe_ir2.op == OP_J) begin
        n_jump++;
        check(pipe_pc2 == 16'd0, "pipe jump target", n);
      end
      if (pipe_ir1.op == OP_NOP) n_squash++;
      if (pipe_ir2.op == OP_D3) n_delay_slot++;
      k = n / 2;
      if (n % 2 == 1) begin
        check(uprog_upc == 1 && uprog_asr == 16'(k) && uprog_pc == 16'(k), "uprog ASR := PC", n);
      end else begin
        check(uprog_upc == 0 && uprog_ir == pm_word(k - 1) && uprog_pc == 16'(k), "uprog IR := PM", n);
        n_fetch++;
      end
      check(bram_data_out1 == e_b1, "bram port 1", n);
      check(bram_data_out2 == e_b2, "bram port 2", n);
      check(cnt_q == 4'(cnt_m), "decade counter", n);
      check(pc_ep == (pcx_now & ~pcx_prev), "one-pulse", n);
      if (pc_ep) n_pulse++;
      @(negedge clk);
    end
    // hold the event input still, let the last pulse finish, then the
    // counter must equal the number of pulses seen (modulo 256)
    for (int i = 0; i < 3; i++) begin
      @(posedge clk);
      #1;
      if (pc_ep) n_pulse++;
    end
    @(posedge clk);
    #1;
    check(pc_q == 8'(n_pulse), "event counter total", CYCLES);
    begin
      int counts [15];
      string names [15];
      counts = '{n_jump, n_squash, n_delay_slot, n_fetch, n_byp_a, n_byp_b, n_lram_wr,
                 n_bram_rdw, n_bram_ww, n_cnt_wrap, n_cnt_clear, n_par_odd, n_par_even,
                 n_pulse, n_hz_switch};
      names = '{"jump", "squash", "delay_slot", "fetch", "bypass_a", "bypass_b", "lram_write",
                "bram_same_addr", "bram_write_clash", "counter_wrap", "counter_clear",
                "parity_odd", "parity_even", "one_pulse", "mux_switch_y1z1"};
      for (int i = 0; i < 15; i++) begin
        $display("mechanism %-16s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
