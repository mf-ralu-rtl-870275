// Reversible gate library.
//
// Every gate the ALU is built from, written as a function that returns all
// of the gate's outputs (the ones the circuit uses and the "garbage" ones it
// throws away), packed as {p, q, r} for 3x3 gates and {p, q} for the 2x2
// Feynman gate. The equations are the standard ones for each gate:
//   FG  (a,b)   : p=a, q=a^b
//   PG  (a,b,c) : p=a, q=a^b, r=ab^c
//   FRG (a,b,c) : p=a, q=a'b^ac, r=a'c^ab         (controlled swap)
//   MFG (a,b,c) : p=a, q=ab, r=a'b^ac             (r is a 2:1 mux, a selects)
//   MFR (a,b,c) : p=a, q=ab'^ac', r=a'c^ab
//   UG  (a,b,c) : p=(a|b)^c, q=b, r=ab^c
//   COG (a,b,c) : p=a, q=a'b^ac, r=bc^b'c'        (q is a 2:1 mux, a selects)
// The MCF gate used as AND (inputs a,b,0) and as OR (inputs a,1,b) is a
// Fredkin gate with those inputs and its two lower outputs swapped, so that
// q is the AND or OR; the garbage outputs chosen this way are this library's
// own reading.
// Pure combinational functions, no timing.
package rev_gates_pkg;

  function automatic logic [1:0] fg(input logic a, input logic b);
    return {a, a ^ b};
  endfunction

  function automatic logic [2:0] pg(input logic a, input logic b, input logic c);
    return {a, a ^ b, (a & b) ^ c};
  endfunction

  function automatic logic [2:0] frg(input logic a, input logic b, input logic c);
    return {a, (~a & b) ^ (a & c), (~a & c) ^ (a & b)};
  endfunction

  // MCF gate wired as a reversible AND: inputs (a, b, 0), q = ab. The other
  // two outputs are a and a'b (the Fredkin outputs of the same inputs).
  function automatic logic [2:0] mcf_and(input logic a, input logic b);
    logic [2:0] f;
    f = frg(a, b, 1'b0);
    return {f[2], f[0], f[1]};
  endfunction

  // MCF gate wired as a reversible OR: inputs (a, 1, b), q = a + b. The other
  // two outputs are a and a' + b (the Fredkin outputs of the same inputs).
  function automatic logic [2:0] mcf_or(input logic a, input logic b);
    logic [2:0] f;
    f = frg(a, 1'b1, b);
    return {f[2], f[0], f[1]};
  endfunction

  function automatic logic [2:0] mfg(input logic a, input logic b, input logic c);
    return {a, a & b, (~a & b) ^ (a & c)};
  endfunction

  // 2:1 multiplexer made of one MFG: output r = s ? c : b.
  function automatic logic mfg_mux(input logic s, input logic b, input logic c);
    logic [2:0] f;
    f = mfg(s, b, c);
    return f[0];
  endfunction

  function automatic logic [2:0] mfr(input logic a, input logic b, input logic c);
    return {a, (a & ~b) ^ (a & ~c), (~a & c) ^ (a & b)};
  endfunction

  function automatic logic [2:0] ug(input logic a, input logic b, input logic c);
    return {(a | b) ^ c, b, (a & b) ^ c};
  endfunction

  function automatic logic [2:0] cog(input logic a, input logic b, input logic c);
    return {a, (~a & b) ^ (a & c), (b & c) ^ (~b & ~c)};
  endfunction

  // 2:1 multiplexer made of one COG: output q = s ? c : b.
  function automatic logic cog_mux(input logic s, input logic b, input logic c);
    logic [2:0] f;
    f = cog(s, b, c);
    return f[1];
  endfunction

endpackage
