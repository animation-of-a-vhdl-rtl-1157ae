// wimp51_regfile: the WIMP51 general-purpose registers R0-R7.
//
// Eight 8-bit registers with one combinational read port and one write port.
// The read port (raddr -> rdata) feeds the AUX register for register-source
// instructions; the write port stores the accumulator for MOV Rn,A at the
// rising clock edge when we is high. Both addresses come from bits 2:0 of
// the instruction. The number and width of the registers follow the
// processor description; the synchronous active-high reset clearing all
// eight registers is this design's choice.
module wimp51_regfile
  import wimp51_pkg::*;
#(
  parameter int unsigned NREGS = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  byte_t                    wdata,
  input  logic [$clog2(NREGS)-1:0] raddr,
  output byte_t                    rdata
);

  byte_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
