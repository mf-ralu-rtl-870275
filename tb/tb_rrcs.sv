// Self-checking testbench for rrcs: addition and subtraction on random and corner operands, with carry and borrow out.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rrcs;
  int checks = 0;
  int failures = 0;
  logic [31:0] a, b, s;
  logic as_i, co;
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
  rrcs dut (.a(a), .b(b), .as_i(as_i), .s(s), .co(co));
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
      a = rnd(); b = rnd(); as_i = 1'(n);
      #1;
      if (!as_i) chk($sformatf("add %h %h", a, b), {co, s}, {1'b0, a} + {1'b0, b});
      else       chk($sformatf("sub %h %h", a, b), {co, s}, {(a < b), a - b});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
