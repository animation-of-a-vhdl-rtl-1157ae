// tb_wimp51_reg: self-checking test of the 8-bit write-enabled register.
// Drives random data, write enables and resets for 2000 cycles and compares
// q after every rising edge with a reference value kept in the testbench.
module tb_wimp51_reg;
  logic clk = 1'b0, rst, we;
  logic [7:0] d, q, ref_q;
  int checks = 0, failures = 0;

  wimp51_reg dut (.clk, .rst, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; d = 8'hA5;
    repeat (2) @(posedge clk);
    @(negedge clk);
    ref_q = 8'h00;
    for (int i = 0; i < 2000; i++) begin
      rst = ($urandom_range(0, 49) == 0);
      we  = $urandom_range(0, 1) == 1;
      d   = 8'($urandom);
      @(negedge clk);
      if (rst) ref_q = 8'h00;
      else if (we) ref_q = d;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL cycle %0d: q=%02h expected %02h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
