// csla_group: N-bit group of the conventional carry-select adder.
//
// Two N-bit ripple-carry adders compute the slice sum in parallel, one for carry-in 0
// (bit 0 a half adder) and one for carry-in 1 (bit 0 a full adder with carry tied to 1).
// When the group's real carry-in arrives from the group below, an (N+1)-bit 2:1
// multiplexer picks {cout, sum} of the matching adder.  Structure as published; the
// multiplexer's insides are this design's own (see csla_mux).
//
// Interface: a, b [N-1:0], cin in; sum [N-1:0], cout out.  Combinational; the path from
// cin to the outputs is one multiplexer.
module csla_group
  import csla_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] sum0, sum1;
  logic         cout0, cout1;

  rca #(.N(N), .CIN_MODE(CIN_ZERO)) u_rca0 (
    .a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0)
  );

  rca #(.N(N), .CIN_MODE(CIN_ONE)) u_rca1 (
    .a(a), .b(b), .cin(1'b1), .sum(sum1), .cout(cout1)
  );

  csla_mux #(.N(N + 1)) u_mux (
    .d0  ({cout0, sum0}),
    .d1  ({cout1, sum1}),
    .sel (cin),
    .y   ({cout, sum})
  );

endmodule
