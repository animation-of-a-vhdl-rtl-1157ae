// wimp51_alu: the WIMP51 arithmetic logic unit with its carry register C.
//
// The ALU takes the accumulator (acc) and the AUX register (aux) and drives
// result, which the accumulator stores when the control unit enables it.
// Operations: pass AUX (MOV A,#data and MOV A,Rn), ADDC (ACC+AUX+C), ANL,
// ORL, XRL, and SWAP (exchange the two nibbles of ACC). The 1-bit carry
// register C lives here: at the rising clock edge with c_we high, ADDC
// stores its carry out, SETC stores 1 and CLRC stores 0. z is high when the
// accumulator is zero and is the condition JZ tests.
//
// The operations follow the instruction set of the processor. The operation
// encoding, computing z from the accumulator, and the synchronous
// active-high reset of C to 0 are this design's choices.
module wimp51_alu
  import wimp51_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  alu_op_t op,
  input  logic    c_we,
  input  byte_t   acc,
  input  byte_t   aux,
  output byte_t   result,
  output logic    c,
  output logic    z
);

  logic c_next;

  always_comb begin
    c_next = c;
    unique case (op)
      ALU_PASS: result = aux;
      ALU_ADDC: {c_next, result} = {1'b0, acc} + {1'b0, aux} + {8'd0, c};
      ALU_ANL:  result = acc & aux;
      ALU_ORL:  result = acc | aux;
      ALU_XRL:  result = acc ^ aux;
      ALU_SWAP: result = {acc[3:0], acc[7:4]};
      ALU_SETC: begin result = acc; c_next = 1'b1; end
      ALU_CLRC: begin result = acc; c_next = 1'b0; end
      default:  result = acc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)       c <= 1'b0;
    else if (c_we) c <= c_next;
  end

  assign z = (acc == 8'd0);

endmodule
