// olb_fcg: final carry generation of an OLB group.
//
// c[j] = c_0[j] | (c_1[j] & cin) for every bit: one AND and one OR per bit.  Because a
// carry generated with carry-in 0 is also generated with carry-in 1, this equals
// selecting c_1 when cin is 1 and c_0 otherwise.  c[N-1] is the group's carry-out, the
// others feed the final sum generation.  Function and the AND-OR form follow the
// published design.
//
// Interface: c_0, c_1 [N-1:0], cin in; c [N-1:0] out.  Combinational, two gates deep.
module olb_fcg #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] c_0,
  input  logic [N-1:0] c_1,
  input  logic         cin,
  output logic [N-1:0] c
);

  for (genvar j = 0; j < N; j++) begin : g_bit
    assign c[j] = c_0[j] | (c_1[j] & cin);
  end

endmodule
