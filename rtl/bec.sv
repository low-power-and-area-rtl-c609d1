// bec: (N+1)-bit binary to excess-1 converter built from modified XOR gates.
//
// Adds one to x without any full adder: y[0] = ~x[0], and for k >= 1
// y[k] = x[k] ^ (x[0] & ... & x[k-1]).  The running AND of the lower bits is not built
// from separate gates: each bit's modified XOR already forms the AND of its two inputs,
// which is exactly the running AND for the next bit.  The N+1 bits are the sum and carry
// of the carry-in-0 adder of a group.  Function and the shared-AND chain follow the
// published design.
//
// Interface: x [N:0] in; y [N:0] = x + 1 (mod 2**(N+1)) out.  Combinational; the chain is
// N gates deep.
module bec #(
  parameter int unsigned N = 3
) (
  input  logic [N:0] x,
  output logic [N:0] y
);

  // t[k] = x[0] & ... & x[k-1]
  logic [N+1:1] t;

  assign y[0] = ~x[0];
  assign t[1] = x[0];

  for (genvar k = 1; k <= N; k++) begin : g_bit
    mod_xor u_xor (.a(x[k]), .b(t[k]), .y(y[k]), .ab(t[k+1]));
  end

  // t[N+1] (all N+1 bits ones) is the overflow of the increment; a group never needs it.
  logic unused_t;
  assign unused_t = t[N+1];

endmodule
