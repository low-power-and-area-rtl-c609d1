// olb_hsg_hcg: half sum and half carry generation of an OLB carry-select group.
//
// For every bit of the slice one modified XOR gives the half sum s0 = a ^ b, and its
// internal AND term gives the half carry c0 = a & b, so the block is N half adders.
// Index convention: c0[j] is the carry produced by bit j, i.e. the carry into bit j+1.
// Function as published; the vector indexing is this implementation's.
//
// Interface: a, b [N-1:0] in; s0, c0 [N-1:0] out.  Combinational, one gate level deep
// for c0 and three for s0.
module olb_hsg_hcg #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,
  output logic [N-1:0] c0
);

  for (genvar j = 0; j < N; j++) begin : g_bit
    half_adder u_ha (.a(a[j]), .b(b[j]), .sum(s0[j]), .cout(c0[j]));
  end

endmodule
