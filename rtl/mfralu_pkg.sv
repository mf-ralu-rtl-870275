// Shared types and defaults of the MF-RALU and its RISC processor.
//
// op_e numbers the 30 MF-RALU operations by the 5-bit alu_in code: 0-7 go to
// the arithmetic unit, 8-15 to the logic unit, 16-23 to the 32-bit output
// multiplexer (MUX1) and 24-29 to the 64-bit one (MUX2); 30 and 31 give zero.
// inst_t is the 16-bit instruction word of the processor. Its layout, and the
// default contents of the instruction and data memories, are this design's
// own choices: the default data memory holds the operand values 0, 1, 2, 3,
// 6, 7, 170, 2112 and 3072 in words 0-8, and the default program starts with
// six instructions that use them (codes 24-29), then walks through all codes.
package mfralu_pkg;

  typedef enum logic [4:0] {
    OP_TRANSFER   = 5'd0,  OP_INC      = 5'd1,  OP_ADD      = 5'd2,  OP_ADDC     = 5'd3,
    OP_SUB        = 5'd4,  OP_SUBB     = 5'd5,  OP_DEC      = 5'd6,  OP_TRANSFER2 = 5'd7,
    OP_OR         = 5'd8,  OP_NOR      = 5'd9,  OP_BUF      = 5'd10, OP_AND      = 5'd11,
    OP_NOT        = 5'd12, OP_XOR      = 5'd13, OP_XNOR     = 5'd14, OP_NAND     = 5'd15,
    OP_ROC        = 5'd16, OP_RTC      = 5'd17, OP_RRBS     = 5'd18, OP_RLBS     = 5'd19,
    OP_RMUX       = 5'd20, OP_RRCA     = 5'd21, OP_RRCS     = 5'd22, OP_RCLA     = 5'd23,
    OP_RCSKA      = 5'd24, OP_RCSA     = 5'd25, OP_RKSA     = 5'd26, OP_RAM      = 5'd27,
    OP_RMBM       = 5'd28, OP_RWM      = 5'd29, OP_NONE30   = 5'd30, OP_NONE31   = 5'd31
  } op_e;

  localparam int IW       = 16;   // instruction width
  localparam int IM_DEPTH = 256;  // addressed by the 8-bit PC
  localparam int DM_DEPTH = 32;
  localparam int XLEN     = 32;

  typedef struct packed {
    logic       c;       // carry in / RMUX select / Booth sign
    logic [4:0] alu_in;  // operation code
    logic [4:0] rdx;     // data memory address of Rx
    logic [4:0] rdy;     // data memory address of Ry
  } inst_t;

  function automatic logic [DM_DEPTH-1:0][XLEN-1:0] default_dm();
    logic [DM_DEPTH-1:0][XLEN-1:0] m;
    for (int i = 0; i < DM_DEPTH; i++) m[i] = XLEN'(32'h9E37_79B9 * (i + 1)) ^ XLEN'(i << 7);
    m[0] = 0;    m[1] = 1;    m[2] = 2;    m[3] = 3;
    m[4] = 6;    m[5] = 7;    m[6] = 170;  m[7] = 2112;  m[8] = 3072;
    return m;
  endfunction

  function automatic logic [IM_DEPTH-1:0][IW-1:0] default_im();
    logic [IM_DEPTH-1:0][IW-1:0] m;
    inst_t t;
    for (int k = 0; k < IM_DEPTH; k++) begin
      t.c      = 1'((k >> 5) & 1);
      t.alu_in = 5'(k);
      t.rdx    = 5'(k * 7 + 3);
      t.rdy    = 5'(k * 13 + 5);
      m[k] = t;
    end
    // 24: 3+6, 25: 3072+2112, 26: 1+0, 27: 170*7, 28: 2112*2, 29: 3*0
    m[0] = inst_t'({1'b0, 5'd24, 5'd3, 5'd4});
    m[1] = inst_t'({1'b0, 5'd25, 5'd8, 5'd7});
    m[2] = inst_t'({1'b0, 5'd26, 5'd1, 5'd0});
    m[3] = inst_t'({1'b0, 5'd27, 5'd6, 5'd5});
    m[4] = inst_t'({1'b0, 5'd28, 5'd7, 5'd2});
    m[5] = inst_t'({1'b0, 5'd29, 5'd3, 5'd0});
    return m;
  endfunction

endpackage
