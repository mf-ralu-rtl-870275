// Data memory: DEPTH words of WIDTH-bit read-only user data with two
// combinational read ports, rx = mem[rdx] and ry = mem[rdy]. The contents
// come from the INIT parameter (by default the operand values of the
// package's default_dm). 32 locations of 32 bits as in the reference design;
// the contents are this design's choice.
module data_memory
  import mfralu_pkg::*;
#(
  parameter int                           DEPTH = DM_DEPTH,
  parameter int                           WIDTH = XLEN,
  parameter logic [DEPTH-1:0][WIDTH-1:0]  INIT  = default_dm(),
  localparam int AW = $clog2(DEPTH)
) (
  input  logic [AW-1:0]    rdx,
  input  logic [AW-1:0]    rdy,
  output logic [WIDTH-1:0] rx,
  output logic [WIDTH-1:0] ry
);
  logic [WIDTH-1:0] rom [DEPTH];

  always_comb
    for (int i = 0; i < DEPTH; i++) rom[i] = INIT[i];

  assign rx = rom[rdx];
  assign ry = rom[rdy];
endmodule
