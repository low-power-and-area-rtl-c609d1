// olb_cg0: carry generation of an OLB group for carry-in 0.
//
// c_0[0] = c0[0] and c_0[j] = c0[j] | (s0[j] & c_0[j-1]): the carries the slice would
// produce if its carry-in were 0.  Bit 0 needs no gate, each higher bit one AND and one
// OR.  c_0[j] is the carry out of bit j.  Function as published (carry generation for
// carry-in 0); the recurrence is the usual generate/propagate carry chain.
//
// Interface: s0, c0 [N-1:0] in (from olb_hsg_hcg); c_0 [N-1:0] out.  Combinational.
module olb_cg0 #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c_0
);

  assign c_0[0] = c0[0];

  for (genvar j = 1; j < N; j++) begin : g_bit
    assign c_0[j] = c0[j] | (s0[j] & c_0[j-1]);
  end

  // The half sum of bit 0 only matters when the carry-in is 1.
  logic unused_s0;
  assign unused_s0 = s0[0];

endmodule
