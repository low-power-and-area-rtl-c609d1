// olb_fsg: final sum generation of an OLB group.
//
// sum[0] = s0[0] ^ cin and sum[j] = s0[j] ^ c[j-1] for j >= 1, one modified XOR gate per
// bit (its AND term is not needed here).  c[j-1] is the final carry into bit j from
// olb_fcg.  Function and the use of the modified XOR follow the published design.
//
// Interface: s0 [N-1:0], c [N-2:0], cin in; sum [N-1:0] out.  Combinational.  N must be
// at least 2, as in every group of the adders.
module olb_fsg #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] s0,
  input  logic [N-2:0] c,
  input  logic         cin,
  output logic [N-1:0] sum
);

  // Carry into each bit: cin for bit 0, the final carries above it.
  logic [N-1:0] cbit;
  logic [N-1:0] unused_ab;

  assign cbit = {c, cin};

  for (genvar j = 0; j < N; j++) begin : g_bit
    mod_xor u_xor (.a(cbit[j]), .b(s0[j]), .y(sum[j]), .ab(unused_ab[j]));
  end

endmodule
