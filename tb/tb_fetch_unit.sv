// Self-checking testbench for fetch_unit: a program of random words is given
// through INIT; the PC is loaded with pro_in during reset, must then advance
// by exactly one per clock (one instruction per cycle), wrap from 255 to 0,
// and f_inst must be the program word at the PC in the same cycle.
module tb_fetch_unit;
  int checks = 0;
  int failures = 0;

  function automatic logic [255:0][15:0] make_prog();
    logic [255:0][15:0] m;
    for (int i = 0; i < 256; i++) m[i] = 16'((i * 40503 + 12345) ^ (i << 9));
    return m;
  endfunction
  localparam logic [255:0][15:0] PROG = make_prog();

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  pro_in, pc;
  logic [15:0] f_inst;
  logic [7:0]  exp_pc;
  int          cycles = 0;

  fetch_unit #(.DEPTH(256), .INIT(PROG)) dut (
    .clk(clk), .rst(rst), .pro_in(pro_in), .pc(pc), .f_inst(f_inst));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
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
    for (int run = 0; run < 3; run++) begin
      pro_in = (run == 0) ? 8'd0 : (run == 1) ? 8'd200 : 8'd77;
      rst = 1'b1;
      @(posedge clk); #1;
      chk("pc after reset", pc, pro_in);
      rst = 1'b0;
      exp_pc = pro_in;
      for (int k = 0; k < 300; k++) begin
        chk($sformatf("pc run %0d step %0d", run, k), pc, exp_pc);
        chk($sformatf("inst at %0d", exp_pc), f_inst, PROG[exp_pc]);
        @(posedge clk); #1;
        exp_pc = exp_pc + 8'd1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
