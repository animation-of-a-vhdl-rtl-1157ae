// wimp51_pkg: types and constants shared by the WIMP51 processor blocks.
//
// The WIMP51 runs a 13-instruction subset of the 8051 instruction set and
// is binary compatible with it, so the opcode values below are the standard
// 8051 encodings of those instructions (the "Rn" forms carry the register
// number in bits 2:0). The three-state machine, the AUX source select, and
// the ALU and PCALU operation codes are this design's own encodings.
package wimp51_pkg;

  typedef logic [7:0] byte_t;

  // Standard 8051 opcodes of the instructions the WIMP51 executes.
  localparam byte_t OP_MOV_A_IMM  = 8'h74;  // MOV A,#data        (2 bytes)
  localparam byte_t OP_ADDC_A_IMM = 8'h34;  // ADDC A,#data       (2 bytes)
  localparam byte_t OP_SJMP       = 8'h80;  // SJMP rel           (2 bytes)
  localparam byte_t OP_JZ         = 8'h60;  // JZ rel             (2 bytes)
  localparam byte_t OP_SWAP_A     = 8'hC4;  // SWAP A
  localparam byte_t OP_SETB_C     = 8'hD3;  // SETB C
  localparam byte_t OP_CLR_C      = 8'hC3;  // CLR C
  // Register forms: upper five bits, Rn in bits 2:0.
  localparam logic [4:0] OPR_MOV_A_RN  = 5'b11101;  // E8-EF  MOV A,Rn
  localparam logic [4:0] OPR_MOV_RN_A  = 5'b11111;  // F8-FF  MOV Rn,A
  localparam logic [4:0] OPR_ADDC_A_RN = 5'b00111;  // 38-3F  ADDC A,Rn
  localparam logic [4:0] OPR_ORL_A_RN  = 5'b01001;  // 48-4F  ORL A,Rn
  localparam logic [4:0] OPR_ANL_A_RN  = 5'b01011;  // 58-5F  ANL A,Rn
  localparam logic [4:0] OPR_XRL_A_RN  = 5'b01101;  // 68-6F  XRL A,Rn

  // Instruction cycle: every instruction takes exactly these three clocks.
  typedef enum logic [1:0] {
    ST_FETCH   = 2'd0,
    ST_DECODE  = 2'd1,
    ST_EXECUTE = 2'd2
  } state_t;

  // Source of the AUX register in the Decode cycle.
  typedef enum logic [1:0] {
    AUX_HOLD = 2'b00,  // keep its value
    AUX_DATA = 2'b01,  // second instruction byte from the data bus
    AUX_REG  = 2'b10   // selected general-purpose register Rn
  } aux_ctl_t;

  // ALU operations. Result goes to ACC; SETC/CLRC only touch the carry.
  typedef enum logic [2:0] {
    ALU_PASS = 3'd0,  // result = AUX            (MOV A,...)
    ALU_ADDC = 3'd1,  // C,result = ACC+AUX+C
    ALU_ANL  = 3'd2,  // result = ACC & AUX
    ALU_ORL  = 3'd3,  // result = ACC | AUX
    ALU_XRL  = 3'd4,  // result = ACC ^ AUX
    ALU_SWAP = 3'd5,  // result = ACC nibbles exchanged
    ALU_SETC = 3'd6,  // C = 1
    ALU_CLRC = 3'd7   // C = 0
  } alu_op_t;

  // PC adder/incrementer operations.
  typedef enum logic {
    PCALU_INC = 1'b0,  // PC + 1
    PCALU_REL = 1'b1   // PC + sign-extended AUX
  } pcalu_op_t;

  // Control word the control unit drives into the datapath.
  typedef struct packed {
    logic      ir_we;
    aux_ctl_t  aux_ctl;
    logic      reg_we;
    logic      acc_we;
    logic      c_we;
    logic      pc_we;
    alu_op_t   alu_op;
    pcalu_op_t pcalu_op;
    logic      psen_n;
  } ctrl_t;

endpackage
