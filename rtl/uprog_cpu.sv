// uprog_cpu: microprogrammed CPU core built around one 16-bit data bus.
//
// Each clock cycle the micro memory, addressed by uPC, produces a
// microword (see uprog_pkg). Its TB field chooses which of IR, PM(ASR),
// PC or ASR drives the bus (0 when none); its FB field chooses which of
// IR, PC or ASR loads the bus value at the clock edge. PCsig increments
// PC unless PC is the bus destination in that cycle. uPCsig makes uPC
// jump to uAddr, otherwise uPC steps by one.
// With the supplied microprogram the core runs the fetch phase forever:
// two cycles per instruction (ASR := PC; IR := PM, PC := PC + 1,
// uPC := 0), so IR takes the words of program memory in turn. The ALU
// field of the microword (bits 15:14) is reserved: this core has no ALU,
// so those bits are left unused.
//
// Structure, field layout and register behaviour are the lecture's.
// The observation outputs are this design's addition (the lecture's CPU
// has only clk and rst). Reset is synchronous and active high and clears
// uPC, PC, IR and ASR. Assertions flag a microword that makes program
// memory a bus destination or names an unknown bus source.
module uprog_cpu
  import uprog_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic [15:0] pc,
  output logic [15:0] ir,
  output logic [15:0] asr,
  output logic [5:0]  upc,
  output logic [15:0] data_bus
);

  microword_t um;
  logic [15:0] um_bits;
  logic [15:0] pm;

  u_mem u_umem (.uaddr(upc), .udata(um_bits));
  p_mem u_pmem (.paddr(asr), .pdata(pm));

  assign um = microword_t'(um_bits);

  always_comb begin
    unique case (um.tb)
      BUS_IR:  data_bus = ir;
      BUS_PM:  data_bus = pm;
      BUS_PC:  data_bus = pc;
      BUS_ASR: data_bus = asr;
      default: data_bus = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)            upc <= '0;
    else if (um.upcsig) upc <= um.uaddr;
    else                upc <= upc + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)                 ir <= '0;
    else if (um.fb == BUS_IR) ir <= data_bus;
  end

  always_ff @(posedge clk) begin
    if (rst)                  pc <= '0;
    else if (um.fb == BUS_PC) pc <= data_bus;
    else if (um.pcsig)        pc <= pc + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)                   asr <= '0;
    else if (um.fb == BUS_ASR) asr <= data_bus;
  end

  // Bus rules: program memory can only drive the bus, and a microword
  // names a known source (or none).
  a_fb_legal: assert property (@(posedge clk) disable iff (rst)
    um.fb inside {BUS_NONE, BUS_IR, BUS_PC, BUS_ASR})
    else $error("microword at uPC %0d writes the bus into a source-only unit", upc);
  a_tb_legal: assert property (@(posedge clk) disable iff (rst)
    um.tb inside {BUS_NONE, BUS_IR, BUS_PM, BUS_PC, BUS_ASR})
    else $error("microword at uPC %0d selects an unknown bus source", upc);

endmodule
