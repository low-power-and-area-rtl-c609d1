// sqrt_csla_olb: square-root carry-select adder with optimized-logic-based groups.
//
// Each group forms half sums and half carries once, builds carry chains for carry-in 0 and
// carry-in 1 from them, merges those with the carry from the group below and forms the
// sums last (olb_csla_group).  This is the smallest and fastest of the three variants.
// The adder is split into a 2-bit ripple-carry adder on bits [1:0], fed by cin, and
// carry-select groups above it whose sizes grow towards the top (csla_pkg has the table
// for the five supported widths 4, 8, 16, 32 and 64).  Every group works out its result
// for both possible carry-ins while the carry is still rippling below it, so the carry
// only has to pass one selection stage per group: the delay grows roughly with the
// square root of WIDTH.  All XORs, half and full adders use the four-gate modified XOR.
// Structure and group sizes follow the published design; the default of 64 bits is its
// largest evaluated size.
//
// Interface: a, b [WIDTH-1:0], cin in; sum [WIDTH-1:0], cout out, {cout, sum} = a + b +
// cin.  Purely combinational, no clock or reset.  Other widths fail at elaboration.
module sqrt_csla_olb
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG = num_groups(WIDTH);

  if (!width_supported(WIDTH)) begin : g_bad_width
    $error("sqrt_csla_olb: WIDTH must be 4, 8, 16, 32 or 64");
  end

  // carry[k] is the carry into group k; carry[NG] is the adder's carry-out.
  logic [NG:0] carry;

  rca #(.N(RCA_BITS), .CIN_MODE(CIN_PORT)) u_rca (
    .a    (a[RCA_BITS-1:0]),
    .b    (b[RCA_BITS-1:0]),
    .cin  (cin),
    .sum  (sum[RCA_BITS-1:0]),
    .cout (carry[0])
  );

  for (genvar k = 0; k < NG; k++) begin : g_grp
    localparam int unsigned LSB = group_lsb(WIDTH, k);
    localparam int unsigned GN  = group_size(WIDTH, k);

    olb_csla_group #(.N(GN)) u_grp (
      .a    (a[LSB +: GN]),
      .b    (b[LSB +: GN]),
      .cin  (carry[k]),
      .sum  (sum[LSB +: GN]),
      .cout (carry[k+1])
    );
  end

  assign cout = carry[NG];

endmodule
