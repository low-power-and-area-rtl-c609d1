// olb_csla_group: N-bit group of the optimized-logic-based (OLB) carry-select adder.
//
// Instead of two full adders per bit, the group forms the half sums and half carries once
// (olb_hsg_hcg), derives from them two carry chains, one for carry-in 0 (olb_cg0) and
// one for carry-in 1 (olb_cg1), merges them with the real carry-in (olb_fcg) and only
// then forms the sums (olb_fsg).  The half sums are shared by both cases, which removes
// the redundant logic of the dual-adder group.  Structure as published.
//
// Interface: a, b [N-1:0], cin in; sum [N-1:0], cout out.  Combinational; from cin the
// path is one AND-OR to the carries and one XOR to the sums.  N >= 2.
module olb_csla_group #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] s0, c0, c_0, c_1, c;

  olb_hsg_hcg #(.N(N)) u_hsg_hcg (.a(a), .b(b), .s0(s0), .c0(c0));
  olb_cg0     #(.N(N)) u_cg0     (.s0(s0), .c0(c0), .c_0(c_0));
  olb_cg1     #(.N(N)) u_cg1     (.s0(s0), .c0(c0), .c_1(c_1));
  olb_fcg     #(.N(N)) u_fcg     (.c_0(c_0), .c_1(c_1), .cin(cin), .c(c));
  olb_fsg     #(.N(N)) u_fsg     (.s0(s0), .c(c[N-2:0]), .cin(cin), .sum(sum));

  assign cout = c[N-1];

endmodule
