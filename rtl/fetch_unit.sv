// Fetching unit: program counter and instruction memory.
//
// The 8-bit PC loads the processor input pro_in while rst is high (reset is
// active high and held low while the processor runs) and then counts up by
// one every clock, wrapping at 255. The instruction memory is a DEPTH-word
// read-only array, initialised from the INIT parameter, read combinationally
// at the PC, so the instruction for address pc is available in the same
// cycle. The reset behaviour and the memory's contents are this design's
// choices; the reference design only says that the PC takes pro_in and
// counts.
module fetch_unit
  import mfralu_pkg::*;
#(
  parameter int                         DEPTH = IM_DEPTH,
  parameter logic [DEPTH-1:0][IW-1:0]   INIT  = default_im()
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [7:0]    pro_in,
  output logic [7:0]    pc,
  output logic [IW-1:0] f_inst
);
  logic [IW-1:0] im [DEPTH];

  always_comb
    for (int i = 0; i < DEPTH; i++) im[i] = INIT[i];

  always_ff @(posedge clk)
    if (rst) pc <= pro_in;
    else     pc <= pc + 8'd1;

  assign f_inst = im[pc];
endmodule
