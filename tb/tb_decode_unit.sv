// Self-checking testbench for decode_unit: random instructions split into their fields.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_decode_unit;
  int checks = 0;
  int failures = 0;
  logic [15:0] f_inst;
  logic [4:0] alu_in, rdx, rdy;
  logic c;
  decode_unit dut (.f_inst(f_inst), .alu_in(alu_in), .rdx(rdx), .rdy(rdy), .c(c));
  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      f_inst = 16'($urandom);
      #1;
      chk("c", c, f_inst[15]);
      chk("alu_in", alu_in, f_inst[14:10]);
      chk("rdx", rdx, f_inst[9:5]);
      chk("rdy", rdy, f_inst[4:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
