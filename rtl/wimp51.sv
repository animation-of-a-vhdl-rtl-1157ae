// wimp51: the WIMP51 processor, an 8-bit subset of the 8051.
//
// The WIMP51 executes thirteen 8051 instructions (MOV, ADDC, ANL, ORL, XRL
// between A and Rn or an immediate, SWAP A, SETB C, CLR C, SJMP and JZ)
// with their standard 8051 machine code, so a stock 8051 assembler builds
// its programs. It has no internal data memory, no special function
// registers, no interrupts and no peripherals. Every instruction takes three
// clock cycles: Fetch (opcode into IR, PC+1), Decode (second byte or Rn into
// AUX, PC+1 for two-byte instructions) and Execute (write ACC, Rn, C or PC).
//
// Datapath: general-purpose registers R0-R7, instruction register IR, operand
// register AUX, accumulator ACC, program counter PC (all 8 bits), the ALU
// (ACC op AUX -> ACC, with carry C), the PC adder/incrementer PCALU
// (PC+1 or PC+AUX -> PC) and the control unit CU.
//
// Interface, as in the processor description: data is the 8-bit program
// memory data input bus, sampled at the rising clock edge in Fetch and in
// the Decode of a two-byte instruction; addr is always the PC; acc shows the
// accumulator; psen_n is the active-low program memory read strobe, low in
// the cycles where data is sampled. The memory must therefore return the
// byte at addr combinationally within the cycle. rst is synchronous and
// active high (this design's choice) and clears every register; execution
// starts at address 00h.
module wimp51
  import wimp51_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  byte_t data,
  output byte_t addr,
  output byte_t acc,
  output logic  psen_n
);

  state_t state;
  ctrl_t  ctrl;
  byte_t  ir, aux, pc, pc_next, alu_result, rn;
  logic   c, z;

  wimp51_cu u_cu (
    .clk, .rst, .ir, .z, .state, .ctrl
  );

  wimp51_reg u_ir (
    .clk, .rst, .we(ctrl.ir_we), .d(data), .q(ir)
  );

  wimp51_regfile u_regfile (
    .clk, .rst,
    .we(ctrl.reg_we), .waddr(ir[2:0]), .wdata(acc),
    .raddr(ir[2:0]), .rdata(rn)
  );

  wimp51_aux u_aux (
    .clk, .rst, .ctl(ctrl.aux_ctl), .data_in(data), .reg_in(rn), .q(aux)
  );

  wimp51_alu u_alu (
    .clk, .rst, .op(ctrl.alu_op), .c_we(ctrl.c_we),
    .acc, .aux, .result(alu_result), .c, .z
  );

  wimp51_reg u_acc (
    .clk, .rst, .we(ctrl.acc_we), .d(alu_result), .q(acc)
  );

  wimp51_pcalu u_pcalu (
    .op(ctrl.pcalu_op), .pc, .aux, .result(pc_next)
  );

  wimp51_reg u_pc (
    .clk, .rst, .we(ctrl.pc_we), .d(pc_next), .q(pc)
  );

  assign addr   = pc;
  assign psen_n = ctrl.psen_n;

endmodule
