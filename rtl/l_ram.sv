// l_ram: single-port RAM of the kind an FPGA builds from LUTs
// (distributed RAM): DEPTH words of DW bits, clocked write, combinational
// read.
//
// When we is 1, the word at addr takes data_in at the rising clock edge.
// data_out always shows the word at addr, so after a write it shows the
// new value from the next cycle on. Power-up contents: 1F at address 0,
// zero elsewhere. Behaviour, sizes and contents follow the lecture.
module l_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [DW-1:0] data_in,
  output logic [DW-1:0] data_out,
  input  logic [AW-1:0] addr
);

  logic [DW-1:0] lram [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) lram[i] = '0;
    lram[0] = DW'(8'h1F);
  end

  always_ff @(posedge clk) begin
    if (we) lram[addr] <= data_in;
  end

  assign data_out = lram[addr];

endmodule
