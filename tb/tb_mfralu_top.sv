// End-to-end testbench of mfralu_top at its default parameters (default
// program and data memory).
//
// Part 1 runs the processor from address 0 and checks the first six
// instructions against the printed waveform example: alu_in 24..29 with
// Rx/Ry = 3/6, 3072/2112, 1/0, 170/7, 2112/2, 3/0 and alu_out = 9, 5184, 1,
// 1190, 4224, 0, one per clock. It then keeps running through the whole
// 256-word program and past the PC wrap, checking every result against the
// reference model. Part 2 resets with pro_in = 200 to check the start
// address. Part 3 drives the 1-bit RALU through all 16 operations.
// Mechanisms counted, each must occur: every one of the 30 operation codes
// (and the two unused codes), the carry/select/sign bit at 1 with an
// adder, RMUX and the Booth multiplier, a PC wrap from 255 to 0, a reset
// start at a non-zero pro_in, and all 16 RALU operations.
module tb_mfralu_top;
  import mfralu_ref_pkg::*;
  import mfralu_pkg::*;
  int checks = 0;
  int failures = 0;

  localparam logic [IM_DEPTH-1:0][IW-1:0]   PROG = default_im();
  localparam logic [DM_DEPTH-1:0][XLEN-1:0] DM   = default_dm();

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  pro_in, pc;
  logic [4:0]  alu_in;
  logic [31:0] rx, ry;
  logic [63:0] alu_out;
  logic        ralu_a, ralu_b, ralu_fo, ralu_co;
  logic [3:0]  ralu_s;
  logic [15:0] ins;
  logic [7:0]  exp_pc, prev_pc;
  int          cycles = 0;
  int          op_seen [32];
  int          c_adder = 0, c_rmux = 0, c_signed = 0, wraps = 0, starts = 0;
  int          ralu_seen [16];

  logic [4:0]  ex_op [6] = '{5'd24, 5'd25, 5'd26, 5'd27, 5'd28, 5'd29};
  logic [31:0] ex_x  [6] = '{32'd3, 32'd3072, 32'd1, 32'd170, 32'd2112, 32'd3};
  logic [31:0] ex_y  [6] = '{32'd6, 32'd2112, 32'd0, 32'd7, 32'd2, 32'd0};
  logic [63:0] ex_f  [6] = '{64'd9, 64'd5184, 64'd1, 64'd1190, 64'd4224, 64'd0};

  mfralu_top dut (
    .clk(clk), .rst(rst), .pro_in(pro_in), .pc(pc), .alu_in(alu_in), .rx(rx), .ry(ry),
    .alu_out(alu_out), .ralu_a(ralu_a), .ralu_b(ralu_b), .ralu_s(ralu_s),
    .ralu_fo(ralu_fo), .ralu_co(ralu_co));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (op_seen[i]) op_seen[i] = 0;
    foreach (ralu_seen[i]) ralu_seen[i] = 0;
    ralu_a = 1'b0; ralu_b = 1'b0; ralu_s = 4'd0;

    // part 1: from address 0, waveform example then the whole program
    pro_in = 8'd0;
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int k = 0; k < 6; k++) begin
      chk($sformatf("example alu_in %0d", k), alu_in, ex_op[k]);
      chk($sformatf("example rx %0d", k), rx, ex_x[k]);
      chk($sformatf("example ry %0d", k), ry, ex_y[k]);
      chk($sformatf("example alu_out %0d", k), alu_out, ex_f[k]);
      @(posedge clk); #1;
    end
    exp_pc = 8'd6;
    for (int k = 6; k < 256 + 20; k++) begin
      ins = PROG[exp_pc];
      chk($sformatf("pc step %0d", k), pc, exp_pc);
      chk($sformatf("alu_out at %0d op %0d", exp_pc, ins[14:10]), alu_out,
          ref_op(ins[14:10], DM[ins[9:5]], DM[ins[4:0]], ins[15]));
      op_seen[alu_in]++;
      if (ins[15] && alu_in inside {5'd23, 5'd24, 5'd25, 5'd26}) c_adder++;
      if (ins[15] && alu_in == 5'd20) c_rmux++;
      if (ins[15] && alu_in == 5'd28) c_signed++;
      prev_pc = pc;
      @(posedge clk); #1;
      if (prev_pc == 8'd255 && pc == 8'd0) wraps++;
      exp_pc = exp_pc + 8'd1;
    end

    // part 2: start address from pro_in
    pro_in = 8'd200;
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    if (pc == 8'd200) starts++;
    for (int k = 0; k < 4; k++) begin
      ins = PROG[8'd200 + 8'(k)];
      chk("pc after start", pc, 8'd200 + 8'(k));
      chk("alu_out after start", alu_out, ref_op(ins[14:10], DM[ins[9:5]], DM[ins[4:0]], ins[15]));
      @(posedge clk); #1;
    end

    // part 3: the 1-bit RALU beside the processor
    for (int v = 0; v < 64; v++) begin
      {ralu_s, ralu_a, ralu_b} = 6'(v);
      #1;
      chk($sformatf("ralu s=%0d", ralu_s), {ralu_co, ralu_fo}, ref_ralu1(ralu_a, ralu_b, ralu_s));
      ralu_seen[ralu_s]++;
    end

    for (int i = 0; i < 32; i++) need($sformatf("operation %0d", i), op_seen[i]);
    need("adder carry in = 1", c_adder);
    need("RMUX select = 1", c_rmux);
    need("signed Booth multiply", c_signed);
    need("PC wrap 255 -> 0", wraps);
    need("start at pro_in", starts);
    for (int i = 0; i < 16; i++) need($sformatf("RALU operation %0d", i), ralu_seen[i]);
    $display("operations: each of 32 codes executed at least %0d times; wraps=%0d",
             op_seen.min()[0], wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
