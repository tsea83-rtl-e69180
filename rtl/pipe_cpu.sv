// pipe_cpu: fetch (IF) and register-read (RR) stages of a classic
// five-stage pipelined CPU, the part of the pipeline that decides which
// instruction enters next.
//
// IF: PC addresses the program memory; the word read is loaded into IR1
//     and PC is copied to PC1, so IR1/PC1 hold an instruction and its own
//     address. PC steps by one every cycle.
// RR: IR1 moves on to IR2 and the adder forms PC2 = PC1 + K(IR1), the
//     target a relative jump in IR1 would go to.
// When the instruction in IR2 is a jump (OP_J), PC is loaded from PC2 and
// the word arriving in IR1 is replaced by a NOP. The instruction that was
// already in IR1 when the jump reached IR2 still moves on, so a jump has
// one delay slot followed by one squashed (NOP) slot. The stages after RR
// (execute, memory, write-back) are not part of this module; IR2 and PC2
// are its outputs towards them.
//
// Registers, their update rules and the NOP injection follow the lecture's
// pipeline. PC width, field positions and opcode values are this design's
// choice (see pipe_pkg). Reset is synchronous and active high; after reset
// IR1 and IR2 hold NOP and PC starts at 0.
module pipe_cpu
  import pipe_pkg::*;
#(
  parameter int unsigned PC_W  = 16,
  parameter int unsigned PM_AW = 9
) (
  input  logic               clk,
  input  logic               rst,
  output logic [PC_W-1:0]    pc,
  output logic [PC_W-1:0]    pc1,
  output logic [PC_W-1:0]    pc2,
  output instr_t             ir1,
  output instr_t             ir2
);

  logic [PM_AW-1:0]   pm_addr;
  logic [INSTR_W-1:0] pm_data;
  logic               jump;
  logic [K_W-1:0]     k;
  logic [PC_W-1:0]    k_ext;

  pipe_pm #(.AW(PM_AW), .DW(INSTR_W)) u_pm (
    .addr     (pm_addr),
    .data_out (pm_data)
  );

  assign pm_addr = pc[PM_AW-1:0];
  assign jump    = (ir2.op == OP_J);
  assign k        = ir1.k;
  assign k_ext    = {{(PC_W-K_W){k[K_W-1]}}, k};   // sign extension

  // PC: next sequential address, or the jump target held in PC2
  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (jump) pc <= pc2;
    else           pc <= pc + 1'b1;
  end

  // IF/RR boundary: instruction and its address
  always_ff @(posedge clk) begin
    if (rst) begin
      ir1 <= '0;       // NOP
      pc1 <= '0;
    end else begin
      ir1 <= jump ? '0 : instr_t'(pm_data);
      pc1 <= pc;
    end
  end

  // a jump in IR2 always squashes the next fetch and redirects PC
  a_squash: assert property (@(posedge clk) disable iff (rst)
    jump |=> (ir1 == '0) && (pc == $past(pc2)))
    else $error("jump did not squash the fetch or redirect PC");

  // RR/EXE boundary: instruction and the relative jump target
  always_ff @(posedge clk) begin
    if (rst) begin
      ir2 <= '0;       // NOP
      pc2 <= '0;
    end else begin
      ir2 <= ir1;
      pc2 <= pc1 + k_ext;
    end
  end

endmodule
