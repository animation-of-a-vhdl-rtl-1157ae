// tb_wimp51_pcalu: exhaustive test of the PC adder/incrementer.
// For every PC and every AUX byte it checks PC+1 and PC + signed(AUX),
// both modulo 256, the latter computed with integer arithmetic.
module tb_wimp51_pcalu;
  import wimp51_pkg::*;
  pcalu_op_t op;
  byte_t pc, aux, result;
  int checks = 0, failures = 0;

  wimp51_pcalu dut (.op, .pc, .aux, .result);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int p = 0; p < 256; p++) begin
      pc = 8'(p);
      op = PCALU_INC; aux = 8'($urandom);
      #1;
      checks++;
      if (result !== 8'((p + 1) % 256)) begin
        failures++;
        $display("FAIL inc pc=%02h result=%02h", pc, result);
      end
      for (int a = 0; a < 256; a++) begin
        op = PCALU_REL; aux = 8'(a);
        #1;
        expected = (p + (a < 128 ? a : a - 256) + 256) % 256;
        checks++;
        if (result !== 8'(expected)) begin
          failures++;
          if (failures < 10) $display("FAIL rel pc=%02h aux=%02h result=%02h expected %02h",
                                      pc, aux, result, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
