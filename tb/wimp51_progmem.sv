// wimp51_progmem: behavioural model of the external program memory of the
// WIMP51 (testbench only, not synthesizable intent).
//
// 256 bytes, asynchronous read: while psen_n is low, data shows the byte at
// addr; while psen_n is high nothing drives the bus, modelled as FFh (a
// pulled-up bus in a two-state simulation). The testbench fills mem by
// hierarchical reference before releasing reset.
module wimp51_progmem (
  input  logic [7:0] addr,
  input  logic       psen_n,
  output logic [7:0] data
);
  logic [7:0] mem [256];

  assign data = psen_n ? 8'hFF : mem[addr];
endmodule
