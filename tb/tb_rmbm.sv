// Self-checking testbench for rmbm: signed and unsigned 32x32 products on random and corner operands.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rmbm;
  int checks = 0;
  int failures = 0;
  logic [31:0] a, b;
  logic sign;
  logic [63:0] p, e;
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
  rmbm dut (.a(a), .b(b), .sign(sign), .p(p));
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
      a = rnd(); b = rnd(); sign = 1'(n);
      #1;
      if (sign) e = 64'($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
      else      e = {32'd0, a} * {32'd0, b};
      chk($sformatf("%s %h*%h", sign ? "s" : "u", a, b), p, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
