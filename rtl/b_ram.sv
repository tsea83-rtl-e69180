// b_ram: true dual-port RAM of the kind an FPGA builds from block RAM:
// DEPTH words of DW bits, two independent ports, each with clocked write
// and clocked (registered) read.
//
// At each rising edge, port n writes data_inn to addrn when wen is 1, and
// data_outn takes the word at addrn as it was before that edge
// (read-first). Read data is therefore one cycle late. If both ports write
// the same address in one cycle, port 2's data is kept. Power-up contents:
// 1F at address 0, zero elsewhere; the read registers are valid from
// the first clock edge on.
// Sizes, contents and the registered read are the lecture's; the
// read-first and port-2-wins rules follow from its single clocked process
// and are spelled out here as this design's definition.
module b_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port 1
  input  logic          we1,
  input  logic [DW-1:0] data_in1,
  output logic [DW-1:0] data_out1,
  input  logic [AW-1:0] addr1,
  // port 2
  input  logic          we2,
  input  logic [DW-1:0] data_in2,
  output logic [DW-1:0] data_out2,
  input  logic [AW-1:0] addr2
);

  logic [DW-1:0] bram [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) bram[i] = '0;
    bram[0] = DW'(8'h1F);
  end

  always_ff @(posedge clk) begin
    if (we1) bram[addr1] <= data_in1;
    if (we2) bram[addr2] <= data_in2;
    data_out1 <= bram[addr1];
    data_out2 <= bram[addr2];
  end

endmodule
