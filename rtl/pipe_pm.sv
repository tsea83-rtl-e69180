// pipe_pm: program memory of the pipelined CPU.
//
// A read-only table of 2**AW words of DW bits with a combinational read
// port, so the fetch stage sees the word at `addr` in the same cycle and
// loads it into IR1 at the next clock edge (a LUT-style ROM).
// The initial program is the lecture's fetch test: four placeholder
// instructions and a relative jump back to address 0,
//   0: 04000000  1: 08000000  2: 540007FE (J 0)  3: 0C000000  4: 10000000
// and zero (NOP) everywhere else. Reading is the only operation.
module pipe_pm #(
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 32
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data_out
);

  always_comb begin
    unique case (addr)
      AW'(0):  data_out = DW'(32'h0400_0000);
      AW'(1):  data_out = DW'(32'h0800_0000);
      AW'(2):  data_out = DW'(32'h5400_07FE);   // J 0
      AW'(3):  data_out = DW'(32'h0C00_0000);
      AW'(4):  data_out = DW'(32'h1000_0000);
      default: data_out = '0;                   // NOP
    endcase
  end

endmodule
