// tb_wimp51_aux: self-checking test of the AUX operand register.
// Random source selects (hold, data bus, register file, unused code),
// random inputs and occasional resets; q is compared after every edge with
// a reference kept in the testbench.
module tb_wimp51_aux;
  import wimp51_pkg::*;
  logic clk = 1'b0, rst;
  aux_ctl_t ctl;
  byte_t data_in, reg_in, q, ref_q;
  int checks = 0, failures = 0;
  int n_data = 0, n_reg = 0, n_hold = 0;

  wimp51_aux dut (.clk, .rst, .ctl, .data_in, .reg_in, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ctl = AUX_HOLD; data_in = '0; reg_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    ref_q = 8'h00;
    for (int i = 0; i < 2000; i++) begin
      rst     = ($urandom_range(0, 49) == 0);
      ctl     = aux_ctl_t'($urandom_range(0, 3));
      data_in = 8'($urandom);
      reg_in  = 8'($urandom);
      @(negedge clk);
      if (rst) ref_q = 8'h00;
      else if (ctl == AUX_DATA) begin ref_q = data_in; n_data++; end
      else if (ctl == AUX_REG)  begin ref_q = reg_in;  n_reg++;  end
      else n_hold++;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL cycle %0d ctl=%0d: q=%02h expected %02h", i, ctl, q, ref_q);
      end
    end
    checks++;
    if (n_data == 0 || n_reg == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
