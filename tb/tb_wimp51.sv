// tb_wimp51: end-to-end test of the WIMP51 processor with its program memory.
//
// A reference model of the instruction set, written from the instruction
// table and independent of the RTL, runs the same program. The testbench
// checks, for every instruction:
//   * the instruction takes exactly three clock cycles: the address bus
//     equals the reference PC at the start of each instruction;
//   * psen_n is low in Fetch, low in Decode only for two-byte instructions,
//     and high in Execute;
//   * ACC (the acc output bus), the carry C and R0-R7 match the reference.
// Part 1 runs a directed program built around ADDC A,#9 at address 02h
// (37h + 09h = 40h); part 2 runs random programs with all thirteen
// instructions and some undefined opcodes, which execute as no-ops.
// It counts how often each instruction, a taken and a not-taken JZ, a
// backward jump and an ADDC carry out occur, and fails if any never did.
// The processor has no parameters, so this test runs it at full size.
module tb_wimp51;
  import wimp51_pkg::*;

  localparam int NPROG  = 40;   // random programs
  localparam int NINSTR = 300;  // instructions per random program

  logic  clk = 1'b0, rst = 1'b1;
  byte_t data, addr, acc;
  logic  psen_n;
  int    checks = 0, failures = 0;

  wimp51 dut (.clk, .rst, .data, .addr, .acc, .psen_n);
  wimp51_progmem u_mem (.addr, .psen_n, .data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3 * NINSTR * (NPROG + 2) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  byte_t m_pc, m_acc;
  logic  m_c;
  byte_t m_r [8];
  // coverage of mechanisms
  int cov_op [14];  // 0..12 instructions, 13 = undefined
  int cov_jz_taken, cov_jz_not, cov_back, cov_carry;

  function automatic int op_class(byte_t op);
    case (op)
      8'h74: return 0;   // MOV A,#data
      8'h34: return 3;   // ADDC A,#data
      8'hC4: return 8;   // SWAP A
      8'hD3: return 9;   // SETB C
      8'hC3: return 10;  // CLR C
      8'h80: return 11;  // SJMP
      8'h60: return 12;  // JZ
      default: ;
    endcase
    if (op >= 8'hE8 && op <= 8'hEF) return 1;  // MOV A,Rn
    if (op >= 8'hF8)                return 2;  // MOV Rn,A
    if (op >= 8'h38 && op <= 8'h3F) return 4;  // ADDC A,Rn
    if (op >= 8'h68 && op <= 8'h6F) return 5;  // XRL A,Rn
    if (op >= 8'h58 && op <= 8'h5F) return 6;  // ANL A,Rn
    if (op >= 8'h48 && op <= 8'h4F) return 7;  // ORL A,Rn
    return 13;
  endfunction

  function automatic bit is_two_byte(byte_t op);
    int k = op_class(op);
    return k == 0 || k == 3 || k == 11 || k == 12;
  endfunction

  task automatic model_step();
    byte_t op, opd, rn;
    int    k, sum;
    op = u_mem.mem[m_pc];
    m_pc = m_pc + 8'd1;
    k = op_class(op);
    cov_op[k]++;
    opd = 8'h00;
    if (is_two_byte(op)) begin
      opd = u_mem.mem[m_pc];
      m_pc = m_pc + 8'd1;
    end
    rn = m_r[op[2:0]];
    case (k)
      0: m_acc = opd;
      1: m_acc = rn;
      2: m_r[op[2:0]] = m_acc;
      3, 4: begin
        sum = int'(m_acc) + int'(k == 3 ? opd : rn) + int'(m_c);
        m_acc = sum[7:0];
        m_c   = sum > 255;
        if (m_c) cov_carry++;
      end
      5: m_acc = m_acc ^ rn;
      6: m_acc = m_acc & rn;
      7: m_acc = m_acc | rn;
      8: m_acc = {m_acc[3:0], m_acc[7:4]};
      9: m_c = 1'b1;
      10: m_c = 1'b0;
      11, 12: begin
        if (k == 11 || m_acc == 8'h00) begin
          if (opd[7]) cov_back++;
          if (k == 12) cov_jz_taken++;
          m_pc = m_pc + opd;
        end else cov_jz_not++;
      end
      default: ;
    endcase
  endtask

  // ---------------- checking ----------------
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run one instruction on the DUT and on the model, checking as it goes.
  // Entered and left at a falling clock edge at the start of a Fetch cycle.
  task automatic run_instr();
    byte_t op;
    bit two;
    op  = u_mem.mem[addr];
    two = is_two_byte(op);
    check(addr == m_pc, $sformatf("fetch address %02h, expected %02h", addr, m_pc));
    check(acc == m_acc, $sformatf("ACC %02h, expected %02h", acc, m_acc));
    check(dut.u_alu.c == m_c, "carry C");
    for (int i = 0; i < 8; i++)
      check(dut.u_regfile.regs[i] == m_r[i], $sformatf("R%0d", i));
    check(psen_n == 1'b0, "psen_n low in Fetch");
    @(negedge clk);
    check(psen_n == !two, "psen_n in Decode");
    @(negedge clk);
    check(psen_n == 1'b1, "psen_n high in Execute");
    @(negedge clk);
    model_step();
  endtask

  task automatic reset_both();
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    m_pc = 8'h00; m_acc = 8'h00; m_c = 1'b0;
    for (int i = 0; i < 8; i++) m_r[i] = 8'h00;
  endtask

  // Random program generator: a stream of whole instructions from 00h.
  task automatic gen_program();
    int a = 0;
    byte_t op;
    while (a < 256) begin
      int pick = $urandom_range(0, 15);
      case (pick)
        0: op = 8'h74;
        1: op = 8'h34;
        2: op = 8'h80;
        3, 4: op = 8'h60;
        5: op = 8'hC4;
        6: op = 8'hD3;
        7: op = 8'hC3;
        8: op = 8'hE8 | 8'($urandom_range(0, 7));
        9: op = 8'hF8 | 8'($urandom_range(0, 7));
        10: op = 8'h38 | 8'($urandom_range(0, 7));
        11: op = 8'h68 | 8'($urandom_range(0, 7));
        12: op = 8'h58 | 8'($urandom_range(0, 7));
        13: op = 8'h48 | 8'($urandom_range(0, 7));
        14: op = 8'hA5;  // undefined on this processor
        default: op = 8'($urandom_range(0, 255));
      endcase
      u_mem.mem[a] = op;
      a++;
      if (is_two_byte(op) && a < 256) begin
        byte_t opd;
        if (op == 8'h80 || op == 8'h60)
          opd = 8'($signed($urandom_range(0, 40)) - 20);
        else
          opd = ($urandom_range(0, 3) == 0) ? 8'h00 : 8'($urandom_range(0, 255));
        if (op == 8'h80 && (opd == 8'hFE || opd == 8'hFF)) opd = 8'h02;
        u_mem.mem[a] = opd;
        a++;
      end
    end
  endtask

  initial begin : main
    int t0;
    for (int i = 0; i < 256; i++) u_mem.mem[i] = 8'h00;
    // Directed program: ADDC A,#9 at 02h with ACC = 37h.
    //  00: MOV A,#37h   02: ADDC A,#09h   04: MOV R3,A   05: CLR C
    //  06: SJMP -8 (to 00h)
    u_mem.mem[0] = 8'h74; u_mem.mem[1] = 8'h37;
    u_mem.mem[2] = 8'h34; u_mem.mem[3] = 8'h09;
    u_mem.mem[4] = 8'hFB;
    u_mem.mem[5] = 8'hC3;
    u_mem.mem[6] = 8'h80; u_mem.mem[7] = 8'hF8;
    @(negedge clk);
    reset_both();
    run_instr();                      // MOV A,#37h
    check(acc == 8'h37, "ACC 37h after MOV A,#37h");
    t0 = $time;
    check(addr == 8'h02, "ADDC fetched from 02h");
    run_instr();                      // ADDC A,#09h
    check(acc == 8'h40, "ACC 40h after ADDC A,#9");
    check(addr == 8'h04, "next fetch at 04h");
    check(($time - t0) == 30, "ADDC A,#9 takes three clock cycles");
    for (int i = 0; i < 10; i++) run_instr();
    check(dut.u_regfile.regs[3] == 8'h40, "R3 = 40h");

    // Random programs.
    for (int p = 0; p < NPROG; p++) begin
      gen_program();
      reset_both();
      for (int i = 0; i < NINSTR; i++) run_instr();
    end

    for (int k = 0; k < 14; k++) begin
      checks++;
      if (cov_op[k] == 0) begin failures++; $display("instruction class %0d never ran", k); end
    end
    checks += 4;
    if (cov_jz_taken == 0) begin failures++; $display("JZ never taken"); end
    if (cov_jz_not == 0)   begin failures++; $display("JZ never fell through"); end
    if (cov_back == 0)     begin failures++; $display("no backward jump"); end
    if (cov_carry == 0)    begin failures++; $display("ADDC never carried out"); end
    $display("coverage: ops %p jz_taken=%0d jz_not=%0d back=%0d carry=%0d",
             cov_op, cov_jz_taken, cov_jz_not, cov_back, cov_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
