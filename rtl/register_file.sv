// register_file: the "3-port memory" of a pipelined CPU: NREG registers of
// DW bits with one clocked write port and two combinational read ports.
//
// Write: when w_d is 1, register addr_w loads data_w at the clock edge.
// Read:  data_a/data_b are the registers at addr_a/addr_b. A read port
// that asks for the register being written in the same cycle (address
// equal, w_d = 1 and its read flag r_a/r_b = 1) gets data_w directly, so
// an instruction in the register-read stage sees the value that the
// write-back stage is storing in that very cycle (write-through bypass).
// Without its read flag a port still returns the stored register.
// All of this is the lecture's register file; parameterising the count
// and width is this design's choice. The registers have no reset.
module register_file #(
  parameter int unsigned NREG = 4,
  parameter int unsigned DW   = 8,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          r_a,
  input  logic          r_b,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  input  logic          w_d,
  input  logic [AW-1:0] addr_w,
  input  logic [DW-1:0] data_w,
  output logic [DW-1:0] alu_a,
  output logic [DW-1:0] alu_b
);

  logic [DW-1:0] regs [NREG];
  logic [DW-1:0] data_a, data_b;
  logic          sa, sb;

  always_ff @(posedge clk) begin
    if (w_d) regs[addr_w] <= data_w;
  end

  assign data_a = regs[addr_a];
  assign data_b = regs[addr_b];

  assign sa = (addr_a == addr_w) && w_d && r_a;
  assign sb = (addr_b == addr_w) && w_d && r_b;

  assign alu_a = sa ? data_w : data_a;
  assign alu_b = sb ? data_w : data_b;

endmodule
