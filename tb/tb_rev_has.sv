// Self-checking testbench for rev_has: exhaustive add and subtract.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rev_has;
  int checks = 0;
  int failures = 0;
  logic as_i, a, b, sd, cb;
  logic [1:0] g;
  rev_has dut (.as_i(as_i), .a(a), .b(b), .sd(sd), .cb(cb), .g(g));
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
    for (int v = 0; v < 8; v++) begin
      {as_i, a, b} = 3'(v);
      #1;
      if (!as_i) chk("add", {cb, sd}, 2'(a) + 2'(b));
      else       chk("sub", {cb, sd}, {(!a && b), (a != b)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
