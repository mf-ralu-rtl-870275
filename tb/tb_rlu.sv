// Self-checking testbench for rlu: random operands, all eight selects.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rlu;
  int checks = 0;
  int failures = 0;
  logic [31:0] a, b, f, e;
  logic [2:0] s;
  function automatic logic [31:0] rnd();
    case ($urandom_range(0, 7))
      0: return 32'h0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      3: return 32'h7FFF_FFFF;
      4: return 32'(1) << $urandom_range(0, 31);
      default: return $urandom;
    endcase
  endfunction
  rlu dut (.a(a), .b(b), .s(s), .f(f));
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
    for (int n = 0; n < 2000; n++) begin
      a = rnd(); b = rnd(); s = 3'(n);
      #1;
      case (s)
        0: e = a | b;
        1: e = ~(a | b);
        2: e = a;
        3: e = a & b;
        4: e = ~a;
        5: e = a ^ b;
        6: e = ~(a ^ b);
        default: e = ~(a & b);
      endcase
      chk($sformatf("s=%0d", s), f, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
