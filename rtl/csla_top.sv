// csla_top: the three square-root carry-select adders built with the modified XOR gate.
//
// The design is a family of three alternative WIDTH-bit adders that share one idea: every
// XOR (and so every half adder, full adder and increment cell) uses a four-gate XOR whose
// internal AND doubles as the half-adder carry.  The three differ in how a carry-select
// group prepares its carry-in-1 result:
//   conv : a second ripple-carry adder            (sqrt_csla_conv)
//   bec  : a binary-to-excess-1 converter         (sqrt_csla_bec)
//   olb  : shared half sums and two carry chains  (sqrt_csla_olb)
// They are independent and stand side by side here, each with its own ports, so they can
// be compared on the same stimulus.  Bundling the three into one top is this
// implementation's choice.
//
// Interface: per variant <v>_a, <v>_b [WIDTH-1:0], <v>_cin in; <v>_sum [WIDTH-1:0],
// <v>_cout out, {<v>_cout, <v>_sum} = <v>_a + <v>_b + <v>_cin.  Purely combinational.
// WIDTH is 4, 8, 16, 32 or 64 (default 64).
module csla_top #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] conv_a,
  input  logic [WIDTH-1:0] conv_b,
  input  logic             conv_cin,
  output logic [WIDTH-1:0] conv_sum,
  output logic             conv_cout,

  input  logic [WIDTH-1:0] bec_a,
  input  logic [WIDTH-1:0] bec_b,
  input  logic             bec_cin,
  output logic [WIDTH-1:0] bec_sum,
  output logic             bec_cout,

  input  logic [WIDTH-1:0] olb_a,
  input  logic [WIDTH-1:0] olb_b,
  input  logic             olb_cin,
  output logic [WIDTH-1:0] olb_sum,
  output logic             olb_cout
);

  sqrt_csla_conv #(.WIDTH(WIDTH)) u_conv (
    .a(conv_a), .b(conv_b), .cin(conv_cin), .sum(conv_sum), .cout(conv_cout)
  );

  sqrt_csla_bec #(.WIDTH(WIDTH)) u_bec (
    .a(bec_a), .b(bec_b), .cin(bec_cin), .sum(bec_sum), .cout(bec_cout)
  );

  sqrt_csla_olb #(.WIDTH(WIDTH)) u_olb (
    .a(olb_a), .b(olb_b), .cin(olb_cin), .sum(olb_sum), .cout(olb_cout)
  );

endmodule
