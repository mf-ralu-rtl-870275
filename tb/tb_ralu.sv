// Self-checking testbench for ralu: the default 1-bit RALU exhaustively (16 operations x 4 inputs) and a 32-bit instance on random operands.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_ralu;
  int checks = 0;
  int failures = 0;
  logic a, b, fo, co;
  logic [3:0] s;
  logic [31:0] a32, b32, f32, e32;
  logic co32;
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
  ralu dut (.a(a), .b(b), .s(s), .fo(fo), .co(co));
  ralu #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .s(s), .fo(f32), .co(co32));
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
    for (int v = 0; v < 64; v++) begin
      {s, a, b} = 6'(v);
      a32 = '0; b32 = '0;
      #1;
      chk($sformatf("1b s=%0d a=%0b b=%0b", s, a, b), {co, fo}, mfralu_ref_pkg::ref_ralu1(a, b, s));
    end
    for (int n = 0; n < 2000; n++) begin
      a32 = rnd(); b32 = rnd(); s = 4'($urandom);
      #1;
      e32 = mfralu_ref_pkg::ref_op({1'b0, s}, a32, b32, 1'b0) & 64'hFFFF_FFFF;
      chk($sformatf("32b s=%0d", s), f32, e32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
