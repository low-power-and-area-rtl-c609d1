// full_adder: full adder made of two modified-XOR half adders and an OR gate.
//
// The first half adder gives the propagate bit p = a ^ b and generate bit g = a & b; the
// second adds the carry-in, giving sum = p ^ cin and t = p & cin; cout = g | t.  With the
// four-gate half adder this is nine gates, which is the count the published design gives
// for its adders (18 gates for a 2-bit RCA).  The split into two half adders is this
// implementation's reading of that gate count.
//
// Interface: a, b, cin in; sum, cout out.  Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p, g, t;

  half_adder u_ha0 (.a(a), .b(b),   .sum(p),   .cout(g));
  half_adder u_ha1 (.a(p), .b(cin), .sum(sum), .cout(t));

  assign cout = g | t;

endmodule
