// Self-checking testbench for mf_ralu: every operation code with c = 0 and 1 on random and corner operands, and the six operations of the processor waveform example (24: 3+6 = 9 ... 29: 3*0 = 0).
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_mf_ralu;
  int checks = 0;
  int failures = 0;
  logic [31:0] a, b;
  logic [4:0] alu_in;
  logic c;
  logic [63:0] f;
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
  mf_ralu dut (.a(a), .b(b), .alu_in(alu_in), .c(c), .f(f));
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
    // worked example values: {alu_in, a, b, expected}
    logic [4:0]  ex_op [6] = '{5'd24, 5'd25, 5'd26, 5'd27, 5'd28, 5'd29};
    logic [31:0] ex_a  [6] = '{32'd3, 32'd3072, 32'd1, 32'd170, 32'd2112, 32'd3};
    logic [31:0] ex_b  [6] = '{32'd6, 32'd2112, 32'd0, 32'd7, 32'd2, 32'd0};
    logic [63:0] ex_f  [6] = '{64'd9, 64'd5184, 64'd1, 64'd1190, 64'd4224, 64'd0};
    for (int i = 0; i < 6; i++) begin
      alu_in = ex_op[i]; a = ex_a[i]; b = ex_b[i]; c = 1'b0;
      #1;
      chk($sformatf("example op %0d", alu_in), f, ex_f[i]);
    end
    for (int n = 0; n < 6400; n++) begin
      a = rnd(); b = rnd(); alu_in = 5'(n); c = 1'(n >> 5);
      #1;
      chk($sformatf("op %0d c=%0b a=%h b=%h", alu_in, c, a, b), f, mfralu_ref_pkg::ref_op(alu_in, a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
