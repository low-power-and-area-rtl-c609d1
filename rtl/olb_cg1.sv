// olb_cg1: carry generation of an OLB group for carry-in 1.
//
// c_1[0] = c0[0] | s0[0] and c_1[j] = c0[j] | (s0[j] & c_1[j-1]): the carries the slice
// would produce if its carry-in were 1.  Bit 0 is one OR gate, each higher bit one AND
// and one OR.  c_1[j] is the carry out of bit j.  Function as published (carry generation
// for carry-in 1); the recurrence is the usual generate/propagate carry chain.
//
// Interface: s0, c0 [N-1:0] in (from olb_hsg_hcg); c_1 [N-1:0] out.  Combinational.
module olb_cg1 #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c_1
);

  assign c_1[0] = c0[0] | s0[0];

  for (genvar j = 1; j < N; j++) begin : g_bit
    assign c_1[j] = c0[j] | (s0[j] & c_1[j-1]);
  end

endmodule
