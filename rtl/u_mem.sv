// u_mem: micro memory of the microprogrammed CPU.
//
// DEPTH microwords of 16 bits, read combinationally at `uaddr` (a LUT
// ROM). It holds the fetch microprogram:
//   0: ASR := PC                                  (TB=PC,  FB=ASR)
//   1: IR := PM(ASR), PC := PC + 1, uPC := 0      (TB=PM,  FB=IR, PCsig, uPCsig)
// and zero microwords elsewhere. The contents and depth are the
// lecture's; addresses at or above DEPTH, which the 6-bit address can
// reach, read as zero by this design's choice.
module u_mem
  import uprog_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic [5:0]  uaddr,
  output logic [15:0] udata
);

  microword_t word;

  always_comb begin
    unique case (uaddr)
      6'd0:    word = '{alu: 2'b00, tb: BUS_PC, fb: BUS_ASR, pcsig: 1'b0, upcsig: 1'b0, uaddr: 6'd0};
      6'd1:    word = '{alu: 2'b00, tb: BUS_PM, fb: BUS_IR,  pcsig: 1'b1, upcsig: 1'b1, uaddr: 6'd0};
      default: word = '0;
    endcase
    // the table has DEPTH words; addresses beyond it read zero
    if (32'(uaddr) >= DEPTH) word = '0;
  end

  assign udata = word;

endmodule
