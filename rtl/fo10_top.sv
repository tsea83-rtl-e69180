// fo10_top: the collection of small designs that together make up this
// set of examples, placed side by side on one clock. They do not talk to
// each other; each keeps its own ports, prefixed by the design it serves:
//
//   pipe_*   pipelined CPU front end (fetch + register read, relative
//            jump with NOP injection) running its built-in program
//   uprog_*  microprogrammed CPU running its fetch microprogram
//   rf_*     3-port register file with write-through bypass
//   lram_*   2048 x 8 single-port RAM, clocked write, combinational read
//   bram_*   2048 x 8 dual-port RAM, clocked write and read
//   cnt_*    decade counter with synchronous active-low clear
//   par_*    32-bit parity
//   pc_*     synchroniser + one-pulser + event counter
//   hz_*     hazard-free 2:1 multiplexer
//
// rst (synchronous, active high) resets the two CPUs and the event
// counter; the other designs have the reset behaviour described in their
// own files. The grouping is this design's; every part follows the
// examples it is named after.
module fo10_top
  import pipe_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // pipelined CPU
  output logic [15:0]  pipe_pc,
  output logic [15:0]  pipe_pc1,
  output logic [15:0]  pipe_pc2,
  output instr_t       pipe_ir1,
  output instr_t       pipe_ir2,
  // microprogrammed CPU
  output logic [15:0]  uprog_pc,
  output logic [15:0]  uprog_ir,
  output logic [15:0]  uprog_asr,
  output logic [5:0]   uprog_upc,
  output logic [15:0]  uprog_bus,
  // register file
  input  logic         rf_r_a,
  input  logic         rf_r_b,
  input  logic [1:0]   rf_addr_a,
  input  logic [1:0]   rf_addr_b,
  input  logic         rf_w_d,
  input  logic [1:0]   rf_addr_w,
  input  logic [7:0]   rf_data_w,
  output logic [7:0]   rf_alu_a,
  output logic [7:0]   rf_alu_b,
  // LUT RAM
  input  logic         lram_we,
  input  logic [10:0]  lram_addr,
  input  logic [7:0]   lram_data_in,
  output logic [7:0]   lram_data_out,
  // block RAM
  input  logic         bram_we1,
  input  logic [10:0]  bram_addr1,
  input  logic [7:0]   bram_data_in1,
  output logic [7:0]   bram_data_out1,
  input  logic         bram_we2,
  input  logic [10:0]  bram_addr2,
  input  logic [7:0]   bram_data_in2,
  output logic [7:0]   bram_data_out2,
  // decade counter
  input  logic         cnt_clear_n,
  output logic [3:0]   cnt_q,
  // parity
  input  logic [31:0]  par_x,
  output logic         par_out,
  // synchroniser / one-pulser / counter
  input  logic         pc_x,
  output logic         pc_ep,
  output logic [7:0]   pc_q,
  // hazard-free mux
  input  logic         hz_x,
  input  logic         hz_y,
  input  logic         hz_z,
  output logic         hz_f
);

  pipe_cpu u_pipe (
    .clk, .rst,
    .pc (pipe_pc), .pc1 (pipe_pc1), .pc2 (pipe_pc2),
    .ir1 (pipe_ir1), .ir2 (pipe_ir2)
  );

  uprog_cpu u_uprog (
    .clk, .rst,
    .pc (uprog_pc), .ir (uprog_ir), .asr (uprog_asr),
    .upc (uprog_upc), .data_bus (uprog_bus)
  );

  register_file u_rf (
    .clk,
    .r_a (rf_r_a), .r_b (rf_r_b), .addr_a (rf_addr_a), .addr_b (rf_addr_b),
    .w_d (rf_w_d), .addr_w (rf_addr_w), .data_w (rf_data_w),
    .alu_a (rf_alu_a), .alu_b (rf_alu_b)
  );

  l_ram u_lram (
    .clk, .we (lram_we), .data_in (lram_data_in),
    .data_out (lram_data_out), .addr (lram_addr)
  );

  b_ram u_bram (
    .clk,
    .we1 (bram_we1), .data_in1 (bram_data_in1), .data_out1 (bram_data_out1), .addr1 (bram_addr1),
    .we2 (bram_we2), .data_in2 (bram_data_in2), .data_out2 (bram_data_out2), .addr2 (bram_addr2)
  );

  bcd_counter u_cnt (.clk, .clear_n (cnt_clear_n), .qout (cnt_q));

  parity32 u_par (.x (par_x), .pout (par_out));

  pulse_counter u_pc (.clk, .rst, .x (pc_x), .ep (pc_ep), .q (pc_q));

  hazard_free_mux u_hz (.x (hz_x), .y (hz_y), .z (hz_z), .f (hz_f));

endmodule
