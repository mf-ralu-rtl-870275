// Self-checking testbench for rau: random operands, all eight selects, result and final carry.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rau;
  int checks = 0;
  int failures = 0;
  logic [31:0] a, b, f, x;
  logic [2:0] s;
  logic co;
  logic [32:0] e;
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
  rau dut (.a(a), .b(b), .s(s), .f(f), .co(co));
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
    for (int n = 0; n < 4000; n++) begin
      a = rnd(); b = rnd(); s = 3'(n);
      #1;
      x = (s[2:1] == 2'd0) ? 32'd0 : (s[2:1] == 2'd1) ? a : (s[2:1] == 2'd2) ? ~a : 32'hFFFF_FFFF;
      e = {1'b0, x} + {1'b0, b} + 33'(s[0]);
      chk($sformatf("s=%0d a=%h b=%h", s, a, b), {co, f}, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
