// wimp51_pcalu: the WIMP51 PC adder/incrementer (PCALU).
//
// Combinational. It takes the program counter and the AUX register and
// produces the next PC: PC+1 for the fetch of each instruction byte, or
// PC+AUX for SJMP and JZ, where AUX holds the 8051 relative offset as a
// two's-complement byte. Because the PC has already stepped past both bytes
// of the jump when the offset is added, the target is relative to the
// instruction that follows the jump, as on the 8051. The sum wraps modulo
// 256 (8-bit address space). The operation encoding is this design's own.
module wimp51_pcalu
  import wimp51_pkg::*;
(
  input  pcalu_op_t op,
  input  byte_t     pc,
  input  byte_t     aux,
  output byte_t     result
);

  always_comb begin
    unique case (op)
      PCALU_INC: result = pc + 8'd1;
      PCALU_REL: result = pc + aux;  // 8-bit wrap makes this a signed add
      default:   result = pc;
    endcase
  end

endmodule
