// tb_bec_csla_group: self-check of the BEC based carry-select group.
//
// Instantiates bec_csla_group for every group size the adders use, N = 2..10, on shared stimulus:
// first every (a, b, cin) of the low 5 operand bits with random upper bits, then random
// operands, then the corner cases all-ones + 0 and all-ones + all-ones with both
// carry-ins.  Each instance's {cout, sum} must equal a + b + cin over its N bits, taken
// from the built-in addition.  Prints one TB_RESULT line; a time watchdog ends a hung run
// as a failure.
module tb_bec_csla_group;
  localparam int unsigned MINN  = 2;
  localparam int unsigned MAXN  = 10;
  localparam int unsigned NINST = MAXN - MINN + 1;
  localparam int unsigned NRAND = 20000;

  logic [MAXN-1:0]  a, b;
  logic             cin;
  logic [NINST-1:0] err;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NINST; i++) begin : g_inst
    localparam int unsigned N = MINN + i;
    logic [N-1:0] sum;
    logic         cout;
    bec_csla_group #(.N(N)) dut (
      .a(a[N-1:0]), .b(b[N-1:0]), .cin(cin), .sum(sum), .cout(cout)
    );
    assign err[i] = ({cout, sum} != ({1'b0, a[N-1:0]} + {1'b0, b[N-1:0]} + {{N{1'b0}}, cin}));
  end

  task automatic check();
    #1;
    checks += NINST;
    if (err != '0) begin
      failures += $countones(err);
      if (failures < 20) $display("FAIL a=%h b=%h cin=%b err=%b", a, b, cin, err);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 11); v++) begin
      a      = MAXN'($urandom);
      b      = MAXN'($urandom);
      a[4:0] = v[4:0];
      b[4:0] = v[9:5];
      cin = v[10];
      check();
    end
    for (int v = 0; v < NRAND; v++) begin
      a   = MAXN'($urandom);
      b   = MAXN'($urandom);
      cin = 1'($urandom);
      check();
    end
    for (int v = 0; v < 4; v++) begin
      a   = '1;
      b   = v[1] ? '1 : '0;
      cin = v[0];
      check();
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
