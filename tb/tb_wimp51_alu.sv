// tb_wimp51_alu: self-checking test of the ALU and its carry register.
// Random operations, operands and carry write enables; the result, the
// carry after each edge and the zero flag are compared with values computed
// in the testbench from the instruction definitions. Includes directed
// ADDC 37h + 09h = 40h and carry-out cases.
module tb_wimp51_alu;
  import wimp51_pkg::*;
  logic clk = 1'b0, rst, c_we;
  alu_op_t op;
  byte_t acc, aux, result, exp_r;
  logic c, z, m_c, exp_c;
  int checks = 0, failures = 0;

  wimp51_alu dut (.clk, .rst, .op, .c_we, .acc, .aux, .result, .c, .z);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic apply(alu_op_t o, byte_t a, byte_t x, logic we);
    int s;
    op = o; acc = a; aux = x; c_we = we;
    #1;
    exp_c = m_c;
    case (o)
      ALU_PASS: exp_r = x;
      ALU_ADDC: begin
        s = int'(a) + int'(x) + int'(m_c);
        exp_r = s[7:0]; exp_c = (s > 255);
      end
      ALU_ANL:  exp_r = a & x;
      ALU_ORL:  exp_r = a | x;
      ALU_XRL:  exp_r = a ^ x;
      ALU_SWAP: exp_r = {a[3:0], a[7:4]};
      ALU_SETC: begin exp_r = a; exp_c = 1'b1; end
      default:  begin exp_r = a; exp_c = 1'b0; end
    endcase
    if (o != ALU_SETC && o != ALU_CLRC)
      check(result == exp_r, $sformatf("op %s %02h,%02h result %02h expected %02h",
                                       o.name(), a, x, result, exp_r));
    check(z == (a == 8'h00), "z flag");
    check(c == m_c, "carry before edge");
    @(negedge clk);
    if (we) m_c = exp_c;
    check(c == m_c, $sformatf("carry after %s", o.name()));
  endtask

  initial begin
    rst = 1'b1; op = ALU_PASS; acc = '0; aux = '0; c_we = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0; m_c = 1'b0;
    check(c == 1'b0, "carry reset");
    apply(ALU_ADDC, 8'h37, 8'h09, 1'b1);
    check(exp_r == 8'h40 && m_c == 1'b0, "37h + 09h = 40h, no carry");
    apply(ALU_ADDC, 8'hF0, 8'h10, 1'b1);
    check(m_c == 1'b1, "F0h + 10h carries out");
    apply(ALU_ADDC, 8'h01, 8'h01, 1'b1);       // uses the carry in: 03h
    apply(ALU_CLRC, 8'h55, 8'h00, 1'b1);
    apply(ALU_SETC, 8'h55, 8'h00, 1'b1);
    apply(ALU_ADDC, 8'h12, 8'h34, 1'b0);       // carry held without c_we
    apply(ALU_SWAP, 8'h1E, 8'h00, 1'b0);
    for (int i = 0; i < 5000; i++)
      apply(alu_op_t'($urandom_range(0, 7)),
            ($urandom_range(0, 7) == 0) ? 8'h00 : 8'($urandom),
            8'($urandom), $urandom_range(0, 3) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
