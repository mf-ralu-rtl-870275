// Self-checking testbench for rlu_1b: all 32 combinations against the logic rows 8-15 of the operation table.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rlu_1b;
  int checks = 0;
  int failures = 0;
  logic a, b, fo;
  logic [2:0] s;
  logic e;
  rlu_1b dut (.a(a), .b(b), .s(s), .fo(fo));
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
      case (s)
        0: e = a || b;
        1: e = !(a || b);
        2: e = a;
        3: e = a && b;
        4: e = !a;
        5: e = a != b;
        6: e = a == b;
        default: e = !(a && b);
      endcase
      chk($sformatf("s=%0d a=%0b b=%0b", s, a, b), fo, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
