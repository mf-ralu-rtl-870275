// Reference model of the MF-RALU operations for the testbenches, written
// with plain SystemVerilog operators (no reversible gates), so that the RTL
// is compared against an independent description of each operation code.
package mfralu_ref_pkg;

  function automatic logic [63:0] ref_op(input logic [4:0] op, input logic [31:0] a,
                                         input logic [31:0] b, input logic c);
    logic [32:0] s33;
    logic signed [63:0] sp;
    case (op)
      5'd0, 5'd7: return {32'd0, b};
      5'd1:  return {32'd0, b + 32'd1};
      5'd2:  return {32'd0, a + b};
      5'd3:  return {32'd0, a + b + 32'd1};
      5'd4:  return {32'd0, ~a + b};
      5'd5:  return {32'd0, ~a + b + 32'd1};
      5'd6:  return {32'd0, b - 32'd1};
      5'd8:  return {32'd0, a | b};
      5'd9:  return {32'd0, ~(a | b)};
      5'd10: return {32'd0, a};
      5'd11: return {32'd0, a & b};
      5'd12: return {32'd0, ~a};
      5'd13: return {32'd0, a ^ b};
      5'd14: return {32'd0, ~(a ^ b)};
      5'd15: return {32'd0, ~(a & b)};
      5'd16: return {32'd0, ~a};
      5'd17: return {32'd0, -a};
      5'd18: return {32'd0, a >> b[4:0]};
      5'd19: return {32'd0, a << b[4:0]};
      5'd20: return {32'd0, c ? a : b};
      5'd21: return {32'd0, a + b};
      5'd22: return {32'd0, a - b};
      5'd23: return {32'd0, a + b + 32'(c)};
      5'd24, 5'd25, 5'd26: begin
        s33 = {1'b0, a} + {1'b0, b} + 33'(c);
        return {31'd0, s33};
      end
      5'd27, 5'd29: return {32'd0, a} * {32'd0, b};
      5'd28: begin
        if (c) sp = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});
        else   sp = $signed({32'd0, a} * {32'd0, b});
        return sp;
      end
      default: return 64'd0;
    endcase
  endfunction

  function automatic logic ref_rau1_co(input logic a, input logic b, input logic [2:0] s);
    logic x;
    logic [1:0] sum;
    case (s[2:1])
      2'b00: x = 1'b0;
      2'b01: x = a;
      2'b10: x = ~a;
      default: x = 1'b1;
    endcase
    sum = 2'(x) + 2'(b) + 2'(s[0]);
    return sum[1];
  endfunction

  // Reference 1-bit RALU: {co, fo} for a, b and select s[3:0].
  function automatic logic [1:0] ref_ralu1(input logic a, input logic b, input logic [3:0] s);
    logic x;
    logic [1:0] sum;
    if (!s[3]) begin
      case (s[2:1])
        2'b00: x = 1'b0;
        2'b01: x = a;
        2'b10: x = ~a;
        default: x = 1'b1;
      endcase
      sum = 2'(x) + 2'(b) + 2'(s[0]);
      return sum;
    end
    case (s[2:0])
      3'd0: x = a | b;
      3'd1: x = ~(a | b);
      3'd2: x = a;
      3'd3: x = a & b;
      3'd4: x = ~a;
      3'd5: x = a ^ b;
      3'd6: x = ~(a ^ b);
      default: x = ~(a & b);
    endcase
    return {ref_rau1_co(a, b, s[2:0]), x};   // RAU carry is produced whatever s[3] is
  endfunction

endpackage
