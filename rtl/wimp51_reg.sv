// wimp51_reg: an 8-bit register with write enable, used for the instruction
// register (IR), the accumulator (ACC) and the program counter (PC) of the
// WIMP51.
//
// q takes d at the rising clock edge when we is high and otherwise holds.
// rst is synchronous and active high and loads RESET_VALUE. The processor
// has these registers as plain 8-bit registers written under a control-unit
// enable; the synchronous reset to zero is this design's choice.
module wimp51_reg #(
  parameter int unsigned      WIDTH       = 8,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
