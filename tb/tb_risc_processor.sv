// Self-checking testbench for risc_processor with a random program and random
// data memory given through its parameters. Each clock one instruction
// executes: the testbench decodes the instruction itself, reads its own copy
// of the data and compares alu_in, rx, ry and alu_out with the reference
// model in the same cycle. Every operation code is seen with c = 0 and 1.
module tb_risc_processor;
  import mfralu_ref_pkg::*;
  int checks = 0;
  int failures = 0;

  function automatic logic [255:0][15:0] make_prog();
    logic [255:0][15:0] m;
    for (int i = 0; i < 256; i++)
      m[i] = {1'(i >> 5), 5'(i), 5'((i * 11 + 7) >> 1), 5'(i * 5 + 3)};
    return m;
  endfunction
  function automatic logic [31:0][31:0] make_dm();
    logic [31:0][31:0] m;
    for (int i = 0; i < 32; i++) m[i] = 32'((i + 3) * 32'h2545F491) ^ 32'(i << 20);
    m[0] = 32'd0; m[1] = 32'hFFFF_FFFF; m[2] = 32'h8000_0000;
    return m;
  endfunction
  localparam logic [255:0][15:0] PROG = make_prog();
  localparam logic [31:0][31:0]  DM   = make_dm();

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  pro_in, pc;
  logic [4:0]  alu_in;
  logic [31:0] rx, ry;
  logic [63:0] alu_out;
  logic [15:0] ins;
  int          cycles = 0;

  risc_processor #(.IM_INIT(PROG), .DM_INIT(DM)) dut (
    .clk(clk), .rst(rst), .pro_in(pro_in), .pc(pc), .alu_in(alu_in),
    .rx(rx), .ry(ry), .alu_out(alu_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pro_in = 8'd0;
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int k = 0; k < 256; k++) begin
      ins = PROG[k];
      chk($sformatf("pc %0d", k), pc, k);
      chk($sformatf("alu_in %0d", k), alu_in, ins[14:10]);
      chk($sformatf("rx %0d", k), rx, DM[ins[9:5]]);
      chk($sformatf("ry %0d", k), ry, DM[ins[4:0]]);
      chk($sformatf("alu_out %0d op %0d", k, ins[14:10]), alu_out,
          ref_op(ins[14:10], DM[ins[9:5]], DM[ins[4:0]], ins[15]));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
