// Reversible Wallace multiplier (RWM): p = a * b, unsigned, 32 x 32 -> 64.
//
// a and b are cut into bytes; sixteen WM8 multipliers form every byte
// product a_i * b_j, each placed at bit 8(i+j) of a 64-bit word, and fifteen
// 64-bit FAS ripples add the sixteen words one after another. WIDTH must be
// 32 (four bytes per operand). Combinational.
module rwm #(
  parameter int WIDTH = 32,
  localparam int NB = WIDTH / 8,
  localparam int PW = 2 * WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [PW-1:0]    p
);
  logic [NB*NB-1:0][PW-1:0] part;
  logic [NB*NB-1:0][PW-1:0] acc;

  for (genvar i = 0; i < NB; i++) begin : g_a
    for (genvar j = 0; j < NB; j++) begin : g_b
      logic [15:0] pr;
      rwm8 u_wm8 (.a(a[8*i +: 8]), .b(b[8*j +: 8]), .p(pr));
      assign part[NB*i+j] = PW'(pr) << (8 * (i + j));
    end
  end

  assign acc[0] = part[0];
  for (genvar k = 1; k < NB * NB; k++) begin : g_acc
    logic unused_co;
    rfas_chain #(.WIDTH(PW)) u_add (.as_i(1'b0), .a(acc[k-1]), .b(part[k]), .ci(1'b0),
                                    .s(acc[k]), .co(unused_co));
  end
  assign p = acc[NB*NB-1];
endmodule
