// wimp51_aux: the WIMP51 auxiliary operand register (AUX).
//
// AUX holds the second operand of an instruction. In the Decode cycle the
// control unit loads it either with the second instruction byte from the
// program memory data bus (immediate data or a relative jump offset) or with
// the general-purpose register named by the instruction; otherwise it holds.
// Its output feeds both the ALU and the PC adder.
//
// ctl (2 bits, as the aux_ctl control signal of the processor): 00 hold,
// 01 load from data bus, 10 load from the register file, 11 hold. The
// encoding and the synchronous active-high reset to zero are this design's
// choices. Loads take effect at the rising clock edge.
module wimp51_aux
  import wimp51_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  aux_ctl_t ctl,
  input  byte_t    data_in,  // program memory data bus
  input  byte_t    reg_in,   // register file read port
  output byte_t    q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else begin
      unique case (ctl)
        AUX_DATA: q <= data_in;
        AUX_REG:  q <= reg_in;
        default:  q <= q;
      endcase
    end
  end

endmodule
