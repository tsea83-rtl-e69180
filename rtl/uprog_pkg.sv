// uprog_pkg: microword layout and bus codes of the microprogrammed CPU.
//
// A microword is 16 bits:  ALU(15:14) TB(13:11) FB(10:8) PCsig(7)
// uPCsig(6) uAddr(5:0). TB picks the register that drives the data bus,
// FB the register that loads from it. PCsig=1 increments PC; uPCsig=1
// makes the next micro address uAddr instead of uPC+1. The field layout
// and bus codes are the lecture's; expressing them as a packed struct and
// an enum is this design's choice.
package uprog_pkg;

  typedef enum logic [2:0] {
    BUS_NONE = 3'b000,
    BUS_IR   = 3'b001,
    BUS_PM   = 3'b010,   // program memory: source only
    BUS_PC   = 3'b011,
    BUS_ASR  = 3'b100
  } bus_sel_e;

  typedef struct packed {
    logic [1:0] alu;     // reserved for an ALU, unused by the fetch core
    bus_sel_e   tb;      // to bus: source
    bus_sel_e   fb;      // from bus: destination
    logic       pcsig;   // 1: PC := PC + 1
    logic       upcsig;  // 1: uPC := uAddr, 0: uPC := uPC + 1
    logic [5:0] uaddr;
  } microword_t;

endpackage
