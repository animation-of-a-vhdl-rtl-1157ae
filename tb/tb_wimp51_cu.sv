// tb_wimp51_cu: self-checking test of the control unit.
// For each of the 256 opcode bytes, with the accumulator-zero input both low
// and high, it runs one Fetch/Decode/Execute sequence and compares the state
// and the whole control word in each of the three cycles with a table
// written in the testbench from the instruction set. It also checks that the
// state returns to Fetch every third cycle (three clocks per instruction).
module tb_wimp51_cu;
  import wimp51_pkg::*;
  logic clk = 1'b0, rst;
  byte_t ir;
  logic z;
  state_t state;
  ctrl_t ctrl, exp;
  int checks = 0, failures = 0;

  wimp51_cu dut (.clk, .rst, .ir, .z, .state, .ctrl);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t idle();
    ctrl_t w = '0;
    w.aux_ctl = AUX_HOLD; w.alu_op = ALU_PASS; w.pcalu_op = PCALU_INC;
    w.psen_n = 1'b1;
    return w;
  endfunction

  function automatic ctrl_t expected(state_t s, byte_t op, logic zz);
    ctrl_t w = idle();
    bit imm2  = (op == 8'h74) || (op == 8'h34) || (op == 8'h80) || (op == 8'h60);
    bit rsrc  = (op[7:3] inside {5'b11101, 5'b00111, 5'b01001, 5'b01011, 5'b01101});
    if (s == ST_FETCH) begin
      w.ir_we = 1; w.pc_we = 1; w.psen_n = 0;
    end else if (s == ST_DECODE) begin
      if (imm2) begin w.aux_ctl = AUX_DATA; w.pc_we = 1; w.psen_n = 0; end
      else if (rsrc) w.aux_ctl = AUX_REG;
    end else begin
      if (op == 8'h74 || op[7:3] == 5'b11101) w.acc_we = 1;
      if (op == 8'h34 || op[7:3] == 5'b00111) begin
        w.alu_op = ALU_ADDC; w.acc_we = 1; w.c_we = 1;
      end
      if (op[7:3] == 5'b01001) begin w.alu_op = ALU_ORL; w.acc_we = 1; end
      if (op[7:3] == 5'b01011) begin w.alu_op = ALU_ANL; w.acc_we = 1; end
      if (op[7:3] == 5'b01101) begin w.alu_op = ALU_XRL; w.acc_we = 1; end
      if (op == 8'hC4) begin w.alu_op = ALU_SWAP; w.acc_we = 1; end
      if (op == 8'hD3) begin w.alu_op = ALU_SETC; w.c_we = 1; end
      if (op == 8'hC3) begin w.alu_op = ALU_CLRC; w.c_we = 1; end
      if (op[7:3] == 5'b11111) w.reg_we = 1;
      if (op == 8'h80) begin w.pcalu_op = PCALU_REL; w.pc_we = 1; end
      if (op == 8'h60) begin w.pcalu_op = PCALU_REL; w.pc_we = zz; end
    end
    return w;
  endfunction

  initial begin
    rst = 1'b1; ir = 8'h00; z = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int zz = 0; zz < 2; zz++) begin
      for (int op = 0; op < 256; op++) begin
        // Fetch: IR still holds the previous byte; the control word must
        // not depend on it.
        ir = 8'($urandom); z = zz[0];
        #1;
        checks++;
        if (state != ST_FETCH || ctrl != expected(ST_FETCH, ir, z)) begin
          failures++; $display("FAIL fetch op=%02h", op);
        end
        @(negedge clk);
        ir = 8'(op);
        #1;
        checks++;
        if (state != ST_DECODE || ctrl != expected(ST_DECODE, ir, z)) begin
          failures++; $display("FAIL decode op=%02h ctrl=%p", op, ctrl);
        end
        @(negedge clk);
        #1;
        checks++;
        if (state != ST_EXECUTE || ctrl != expected(ST_EXECUTE, ir, z)) begin
          failures++; $display("FAIL execute op=%02h z=%0d ctrl=%p", op, z, ctrl);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
