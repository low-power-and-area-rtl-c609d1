// half_adder: half adder built from a single modified XOR gate.
//
// The sum is the modified XOR of the two inputs and the carry is that gate's internal
// AND term, so the half adder costs four gates and has no separate AND gate, as in the
// published design.
//
// Interface: a, b in; sum = a ^ b, cout = a & b out.  Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  mod_xor u_xor (
    .a  (a),
    .b  (b),
    .y  (sum),
    .ab (cout)
  );

endmodule
