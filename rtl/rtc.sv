// Reversible 2's complement (RTC): f = ~a + 1 (mod 2^WIDTH).
//
// A row of inverting Feynman gates (roc) followed by the HAS/FAS ripple adder
// (rrcs, adding) with the constant 1 as second operand. The count 32 + 127 =
// 159 gates matches the reference figure for this unit. Combinational.
module rtc #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] f
);
  logic [WIDTH-1:0] na;
  logic             unused_co;

  roc  #(.WIDTH(WIDTH)) u_inv (.a(a), .f(na));
  rrcs #(.WIDTH(WIDTH)) u_add (.a(na), .b(WIDTH'(1)), .as_i(1'b0), .s(f), .co(unused_co));
endmodule
