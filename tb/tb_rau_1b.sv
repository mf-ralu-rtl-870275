// Self-checking testbench for rau_1b: all 32 combinations against the arithmetic rows 0-7 of the operation table.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rau_1b;
  int checks = 0;
  int failures = 0;
  logic a, b, fo, co;
  logic [2:0] s;
  logic x;
  rau_1b dut (.a(a), .b(b), .s(s), .fo(fo), .co(co));
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
    for (int v = 0; v < 32; v++) begin
      {s, a, b} = 5'(v);
      #1;
      // operand chosen by s[2:1]: 0, a, ~a, 1 ; s[0] is the carry in
      x = (s[2:1] == 2'd1) ? a : (s[2:1] == 2'd2) ? !a : (s[2:1] == 2'd3);
      chk($sformatf("s=%0d a=%0b b=%0b", s, a, b), {co, fo}, 2'(x) + 2'(b) + 2'(s[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
