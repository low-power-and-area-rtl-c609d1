// rca: N-bit ripple-carry adder made of modified-XOR half and full adders.
//
// Bits 1..N-1 are full adders chained through their carries.  Bit 0 depends on
// CIN_MODE (see csla_pkg):
//   CIN_PORT : full adder fed by the cin port (the 2-bit RCA at the bottom of every
//              square-root adder)
//   CIN_ZERO : half adder, the "carry-in = 0" RCA of a carry-select group
//   CIN_ONE  : full adder with its carry input tied to 1, the "carry-in = 1" RCA
// The three forms follow the published gate-level drawings and gate counts; keeping the
// constant-1 full adder (rather than a simplified bit 0) is what the published count
// implies.  In CIN_ZERO and CIN_ONE modes the cin port is not read; it stays on the
// interface so that all three forms are interchangeable.
//
// Interface: a, b [N-1:0], cin in; sum [N-1:0], cout out.  Combinational; the carry
// ripples through N cells.
module rca
  import csla_pkg::*;
#(
  parameter int unsigned N        = 2,
  parameter cin_mode_e   CIN_MODE = CIN_PORT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // c[i] is the carry into bit i; c[N] is the carry out.
  logic [N:0] c;

  if (CIN_MODE == CIN_ZERO) begin : g_bit0_ha
    half_adder u_bit0 (.a(a[0]), .b(b[0]), .sum(sum[0]), .cout(c[1]));
    assign c[0] = 1'b0;
  end else begin : g_bit0_fa
    assign c[0] = (CIN_MODE == CIN_ONE) ? 1'b1 : cin;
    full_adder u_bit0 (.a(a[0]), .b(b[0]), .cin(c[0]), .sum(sum[0]), .cout(c[1]));
  end

  for (genvar i = 1; i < N; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[N];

  // c[0] is the carry actually used by bit 0; cin only feeds it in CIN_PORT mode.
  logic unused_cin;
  assign unused_cin = (CIN_MODE != CIN_PORT) & cin;

endmodule
