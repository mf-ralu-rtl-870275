// Self-checking testbench for rev_gates_pkg: every gate function of the library against its defining equation, all 8 input combinations.
// Prints TB_RESULT with the number of checks and failures; a watchdog ends
// the run with a failure if it does not finish in time.
module tb_rev_gates_pkg;
  int checks = 0;
  int failures = 0;
  logic a, b, c;

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
      {a, b, c} = 3'(v);
      chk("fg",  rev_gates_pkg::fg(a, b), {a, (a != b)});
      chk("pg",  rev_gates_pkg::pg(a, b, c), {a, (a != b), ((a && b) != c)});
      chk("frg", rev_gates_pkg::frg(a, b, c), a ? {a, c, b} : {a, b, c});
      chk("mfg", rev_gates_pkg::mfg(a, b, c), {a, (a && b), a ? c : b});
      chk("mfg_mux", rev_gates_pkg::mfg_mux(a, b, c), a ? c : b);
      chk("mfr", rev_gates_pkg::mfr(a, b, c), {a, a && (b != c), a ? b : c});
      chk("ug",  rev_gates_pkg::ug(a, b, c), {((a || b) != c), b, ((a && b) != c)});
      chk("cog", rev_gates_pkg::cog(a, b, c), {a, a ? c : b, (b == c)});
      chk("cog_mux", rev_gates_pkg::cog_mux(a, b, c), a ? c : b);
      chk("mcf_and", rev_gates_pkg::mcf_and(a, b) & 3'b010, {1'b0, a && b, 1'b0});
      chk("mcf_or",  rev_gates_pkg::mcf_or(a, b) & 3'b010, {1'b0, a || b, 1'b0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
