// Self-checking testbench for data_memory: with contents given through INIT
// both read ports must return the addressed word for every pair of
// addresses; a second instance with the default contents must hold the
// documented operand values 0, 1, 2, 3, 6, 7, 170, 2112, 3072 in words 0-8.
module tb_data_memory;
  int checks = 0;
  int failures = 0;

  function automatic logic [31:0][31:0] make_mem();
    logic [31:0][31:0] m;
    for (int i = 0; i < 32; i++) m[i] = 32'(i * 32'h01000193 + 32'h811C9DC5);
    return m;
  endfunction
  localparam logic [31:0][31:0] MEM = make_mem();

  logic [4:0]  rdx, rdy;
  logic [31:0] rx, ry, rx_d, ry_d;
  logic [31:0] dflt [9] = '{0, 1, 2, 3, 6, 7, 170, 2112, 3072};

  data_memory #(.INIT(MEM)) dut (.rdx(rdx), .rdy(rdy), .rx(rx), .ry(ry));
  data_memory dut_d (.rdx(rdx), .rdy(rdy), .rx(rx_d), .ry(ry_d));

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        rdx = 5'(x); rdy = 5'(y);
        #1;
        chk($sformatf("rx[%0d]", x), rx, MEM[x]);
        chk($sformatf("ry[%0d]", y), ry, MEM[y]);
      end
    for (int i = 0; i < 9; i++) begin
      rdx = 5'(i); rdy = 5'(8 - i);
      #1;
      chk($sformatf("default rx[%0d]", i), rx_d, dflt[i]);
      chk($sformatf("default ry[%0d]", 8 - i), ry_d, dflt[8 - i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
