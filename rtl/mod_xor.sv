// mod_xor: the modified two-input XOR gate.
//
// The output is formed as (A OR B) AND NOT(A AND B): the first level is one OR and one
// AND gate, the AND is inverted and the two are ANDed, four gates in all (a sum-of-products
// XOR built from inverters and AND/OR gates needs five).  The first-level AND term A.B is
// brought out on port ab, so a half adder gets its carry from this gate and needs no AND
// of its own.  The gate structure and the reuse of the AND term follow the published
// design; naming the internal AND as an output port is this implementation's choice.
//
// Interface: a, b in; y = a ^ b, ab = a & b out.  Purely combinational, no clock.
module mod_xor (
  input  logic a,
  input  logic b,
  output logic y,
  output logic ab
);

  logic a_or_b;    // first level: OR
  logic a_and_b;   // first level: AND (shared with the half-adder carry)
  logic a_nand_b;  // inverter

  assign a_or_b   = a | b;
  assign a_and_b  = a & b;
  assign a_nand_b = ~a_and_b;
  assign y        = a_or_b & a_nand_b;
  assign ab       = a_and_b;

endmodule
