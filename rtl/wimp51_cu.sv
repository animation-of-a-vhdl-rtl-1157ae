// wimp51_cu: the WIMP51 control unit (CU).
//
// A three-state machine, Fetch -> Decode -> Execute -> Fetch, so every
// instruction takes exactly three clock cycles. From the state and the
// instruction register it drives the control word of the datapath:
//
//   Fetch    read the opcode byte into IR (ir_we), PC <= PC+1, psen_n low.
//   Decode   two-byte instructions (MOV A,#data, ADDC A,#data, SJMP, JZ):
//            read the second byte into AUX, PC <= PC+1, psen_n low.
//            Register-source instructions (MOV/ADDC/ORL/ANL/XRL A,Rn):
//            AUX <= Rn. Anything else: nothing happens.
//   Execute  write the destination: ACC from the ALU, Rn from ACC
//            (MOV Rn,A), C (ADDC, SETB C, CLR C), or PC <= PC+AUX for SJMP
//            and for JZ when z (accumulator zero) is high.
//
// The state sequence, the per-cycle actions and the opcodes (standard 8051
// encodings) follow the processor description. Bytes that are not one of
// the thirteen instructions execute as a one-byte no-operation; that, the
// reset into Fetch (synchronous, active high), and the encoding of the
// control signals are this design's choices. psen_n is a combinational
// function of the state and IR, valid for the whole cycle.
module wimp51_cu
  import wimp51_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  byte_t  ir,
  input  logic   z,
  output state_t state,
  output ctrl_t  ctrl
);

  // Instruction classes decoded from IR.
  typedef enum logic [3:0] {
    I_NOP, I_MOV_A_IMM, I_ADDC_A_IMM, I_SJMP, I_JZ, I_MOV_A_RN,
    I_ADDC_A_RN, I_ORL_A_RN, I_ANL_A_RN, I_XRL_A_RN, I_MOV_RN_A,
    I_SWAP, I_SETB_C, I_CLR_C
  } instr_t;

  instr_t instr;

  always_comb begin
    instr = I_NOP;
    unique case (ir)
      OP_MOV_A_IMM:  instr = I_MOV_A_IMM;
      OP_ADDC_A_IMM: instr = I_ADDC_A_IMM;
      OP_SJMP:       instr = I_SJMP;
      OP_JZ:         instr = I_JZ;
      OP_SWAP_A:     instr = I_SWAP;
      OP_SETB_C:     instr = I_SETB_C;
      OP_CLR_C:      instr = I_CLR_C;
      default: begin
        unique case (ir[7:3])
          OPR_MOV_A_RN:  instr = I_MOV_A_RN;
          OPR_MOV_RN_A:  instr = I_MOV_RN_A;
          OPR_ADDC_A_RN: instr = I_ADDC_A_RN;
          OPR_ORL_A_RN:  instr = I_ORL_A_RN;
          OPR_ANL_A_RN:  instr = I_ANL_A_RN;
          OPR_XRL_A_RN:  instr = I_XRL_A_RN;
          default:       instr = I_NOP;
        endcase
      end
    endcase
  end

  logic two_byte, reg_src;
  assign two_byte = instr inside {I_MOV_A_IMM, I_ADDC_A_IMM, I_SJMP, I_JZ};
  assign reg_src  = instr inside {I_MOV_A_RN, I_ADDC_A_RN, I_ORL_A_RN,
                                  I_ANL_A_RN, I_XRL_A_RN};

  // State register.
  always_ff @(posedge clk) begin
    if (rst) state <= ST_FETCH;
    else begin
      unique case (state)
        ST_FETCH:   state <= ST_DECODE;
        ST_DECODE:  state <= ST_EXECUTE;
        default:    state <= ST_FETCH;
      endcase
    end
  end

  // Control word.
  always_comb begin
    ctrl          = '0;
    ctrl.aux_ctl  = AUX_HOLD;
    ctrl.alu_op   = ALU_PASS;
    ctrl.pcalu_op = PCALU_INC;
    ctrl.psen_n   = 1'b1;
    unique case (state)
      ST_FETCH: begin
        ctrl.ir_we  = 1'b1;
        ctrl.pc_we  = 1'b1;
        ctrl.psen_n = 1'b0;
      end
      ST_DECODE: begin
        if (two_byte) begin
          ctrl.aux_ctl = AUX_DATA;
          ctrl.pc_we   = 1'b1;
          ctrl.psen_n  = 1'b0;
        end else if (reg_src) begin
          ctrl.aux_ctl = AUX_REG;
        end
      end
      default: begin  // ST_EXECUTE
        unique case (instr)
          I_MOV_A_IMM, I_MOV_A_RN: begin
            ctrl.alu_op = ALU_PASS; ctrl.acc_we = 1'b1;
          end
          I_ADDC_A_IMM, I_ADDC_A_RN: begin
            ctrl.alu_op = ALU_ADDC; ctrl.acc_we = 1'b1; ctrl.c_we = 1'b1;
          end
          I_ORL_A_RN: begin ctrl.alu_op = ALU_ORL;  ctrl.acc_we = 1'b1; end
          I_ANL_A_RN: begin ctrl.alu_op = ALU_ANL;  ctrl.acc_we = 1'b1; end
          I_XRL_A_RN: begin ctrl.alu_op = ALU_XRL;  ctrl.acc_we = 1'b1; end
          I_SWAP:     begin ctrl.alu_op = ALU_SWAP; ctrl.acc_we = 1'b1; end
          I_SETB_C:   begin ctrl.alu_op = ALU_SETC; ctrl.c_we   = 1'b1; end
          I_CLR_C:    begin ctrl.alu_op = ALU_CLRC; ctrl.c_we   = 1'b1; end
          I_MOV_RN_A: ctrl.reg_we = 1'b1;
          I_SJMP: begin ctrl.pcalu_op = PCALU_REL; ctrl.pc_we = 1'b1; end
          I_JZ:   begin ctrl.pcalu_op = PCALU_REL; ctrl.pc_we = z;    end
          default: ;
        endcase
      end
    endcase
  end

  // The three states are the only reachable ones.
  a_state_legal: assert property (@(posedge clk) disable iff (rst)
    state inside {ST_FETCH, ST_DECODE, ST_EXECUTE});
  // Program memory is read only in Fetch and in Decode.
  a_psen_timing: assert property (@(posedge clk) disable iff (rst)
    !ctrl.psen_n |-> state != ST_EXECUTE);

endmodule
