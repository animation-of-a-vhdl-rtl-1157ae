// tb_wimp51_regfile: self-checking test of the R0-R7 register file.
// Random writes and reads against a reference array; every register is
// also read back after a reset to check that reset clears all eight.
module tb_wimp51_regfile;
  import wimp51_pkg::*;
  logic clk = 1'b0, rst, we;
  logic [2:0] waddr, raddr;
  byte_t wdata, rdata;
  byte_t model [8];
  int checks = 0, failures = 0;

  wimp51_regfile dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int r = 0; r < 8; r++) begin
      raddr = 3'(r);
      #1;
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        $display("FAIL R%0d = %02h expected %02h at %0t", r, rdata, model[r], $time);
      end
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < 8; r++) model[r] = 8'h00;
    check_all();
    for (int i = 0; i < 3000; i++) begin
      we    = $urandom_range(0, 1) == 1;
      waddr = 3'($urandom);
      wdata = 8'($urandom);
      raddr = 3'($urandom);
      #1;
      // read port is combinational: it shows the value before this edge
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL read R%0d = %02h expected %02h", raddr, rdata, model[raddr]);
      end
      @(negedge clk);
      if (we) model[waddr] = wdata;
    end
    we = 1'b0;
    check_all();
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < 8; r++) model[r] = 8'h00;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
