// bec_csla_group: N-bit group of the BEC based carry-select adder.
//
// One N-bit ripple-carry adder computes {cout0, sum0} for carry-in 0.  An (N+1)-bit
// binary-to-excess-1 converter turns that into the carry-in-1 result {cout0, sum0} + 1,
// replacing the second ripple-carry adder of the conventional group.  An (N+1)-bit 2:1
// multiplexer picks one of the two with the group's carry-in.  Structure as published;
// the multiplexer's insides are this design's own.
//
// Interface: a, b [N-1:0], cin in; sum [N-1:0], cout out.  Combinational.
module bec_csla_group
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

  logic [N-1:0] sum0;
  logic         cout0;
  logic [N:0]   res1;

  rca #(.N(N), .CIN_MODE(CIN_ZERO)) u_rca0 (
    .a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0)
  );

  bec #(.N(N)) u_bec (
    .x ({cout0, sum0}),
    .y (res1)
  );

  csla_mux #(.N(N + 1)) u_mux (
    .d0  ({cout0, sum0}),
    .d1  (res1),
    .sel (cin),
    .y   ({cout, sum})
  );

endmodule
