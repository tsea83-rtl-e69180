// p_mem: program memory of the microprogrammed CPU.
//
// DEPTH words of 16 bits, read combinationally at `paddr` (the ASR
// register). Initial contents are the lecture's: 0042 at address 0,
// 00A0 at address 1, zero elsewhere. Addresses at or above DEPTH read as
// zero (this design's choice; the 16-bit address exceeds the table).
module p_mem #(
  parameter int unsigned DEPTH = 16
) (
  input  logic [15:0] paddr,
  output logic [15:0] pdata
);

  always_comb begin
    unique case (paddr)
      16'd0:   pdata = 16'h0042;
      16'd1:   pdata = 16'h00A0;
      default: pdata = 16'h0000;
    endcase
    // the table has DEPTH words; addresses beyond it read zero
    if (32'(paddr) >= DEPTH) pdata = 16'h0000;
  end

endmodule
