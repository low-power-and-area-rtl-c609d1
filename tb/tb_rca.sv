// tb_rca: exhaustive self-check of the ripple-carry adder in all three carry-in forms.
//
// Instantiates rca for N = 1..6 in each of CIN_PORT, CIN_ZERO and CIN_ONE (18 instances)
// on shared stimulus and runs every (a, b, cin) of 6-bit operands.  The expected
// {cout, sum} is a + b + cin, a + b and a + b + 1 respectively, taken from the built-in
// addition.  Prints one TB_RESULT line; a time watchdog ends a hung run as a failure.
module tb_rca;
  import csla_pkg::*;

  localparam int unsigned MAXN  = 6;
  localparam int unsigned NINST = 3 * MAXN;

  logic [MAXN-1:0]  a, b;
  logic             cin;
  logic [NINST-1:0] err;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NINST; i++) begin : g_inst
    localparam int unsigned N        = i / 3 + 1;
    localparam cin_mode_e   CIN_MODE = cin_mode_e'(i % 3);
    logic [N-1:0] sum;
    logic         cout;
    logic [N:0]   expect_v;

    rca #(.N(N), .CIN_MODE(CIN_MODE)) dut (
      .a(a[N-1:0]), .b(b[N-1:0]), .cin(cin), .sum(sum), .cout(cout)
    );

    always_comb begin
      case (CIN_MODE)
        CIN_ZERO: expect_v = {1'b0, a[N-1:0]} + {1'b0, b[N-1:0]};
        CIN_ONE:  expect_v = {1'b0, a[N-1:0]} + {1'b0, b[N-1:0]} + 1'b1;
        default:  expect_v = {1'b0, a[N-1:0]} + {1'b0, b[N-1:0]} + {{N{1'b0}}, cin};
      endcase
    end

    assign err[i] = ({cout, sum} != expect_v);
  end

  initial begin
    for (int v = 0; v < (1 << (2 * MAXN + 1)); v++) begin
      {a, b, cin} = (2 * MAXN + 1)'(v);
      #1;
      checks += NINST;
      if (err != '0) begin
        failures += $countones(err);
        if (failures < 20) $display("FAIL a=%h b=%h cin=%b err=%b", a, b, cin, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
