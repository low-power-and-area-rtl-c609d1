// csla_mux: N-bit 2:1 multiplexer of a carry-select group.
//
// Chooses between the result computed for carry-in 0 (d0) and the one computed for
// carry-in 1 (d1) with the group's real carry-in.  In a group of n sum bits it is n+1 bits
// wide (sum and carry-out), drawn as "MUX 8:4" for a 3-bit group.  Its gate structure is
// not published; a plain 2:1 selection is used.
//
// Interface: d0, d1 [N-1:0], sel in; y = sel ? d1 : d0.  Combinational.
module csla_mux #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
