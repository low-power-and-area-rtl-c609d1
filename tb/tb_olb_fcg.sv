// tb_olb_fcg: self-check of the OLB final carry generation block.
//
// Instantiates olb_fcg for N = 2..10 on shared stimulus; fed with the carries of a + b and of a + b + 1, its output must be the carries of a + b + cin.
// The reference values come from the built-in addition of the tb's operands a and b.
// Stimulus: every (a, b, cin) of the low 5 bits with random upper bits, then random
// operands.  Prints one TB_RESULT line; a time watchdog ends a hung run as a failure.
module tb_olb_fcg;
  localparam int unsigned MINN  = 2;
  localparam int unsigned MAXN  = 10;
  localparam int unsigned NINST = MAXN - MINN + 1;
  localparam int unsigned NRAND = 20000;

  logic [MAXN-1:0]  a, b;
  logic             cin;
  logic [MAXN-1:0]  s0, c0;          // half sums and carries, formed here from a and b
  logic [MAXN-1:0]  cy0, cy1, cy;    // carry out of each bit for carry-in 0, 1 and cin
  logic [NINST-1:0] err;
  int checks = 0, failures = 0;

  // Carry out of bit j of a + b + c: bit j+1 of the sum with the operand bits removed.
  function automatic logic [MAXN-1:0] carries(logic [MAXN-1:0] x, logic [MAXN-1:0] y, logic c);
    logic [MAXN:0] s;
    s = {1'b0, x} + {1'b0, y} + {{MAXN{1'b0}}, c};
    return MAXN'((s ^ {1'b0, x} ^ {1'b0, y}) >> 1);
  endfunction

  assign s0  = a ^ b;
  assign c0  = a & b;
  assign cy0 = carries(a, b, 1'b0);
  assign cy1 = carries(a, b, 1'b1);
  assign cy  = carries(a, b, cin);

  for (genvar i = 0; i < NINST; i++) begin : g_inst
    localparam int unsigned N = MINN + i;
    logic [N-1:0] c;
    olb_fcg #(.N(N)) dut (.c_0(cy0[N-1:0]), .c_1(cy1[N-1:0]), .cin(cin), .c(c));
    assign err[i] = (c != cy[N-1:0]);
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
      cin    = v[10];
      check();
    end
    for (int v = 0; v < NRAND; v++) begin
      a   = MAXN'($urandom);
      b   = MAXN'($urandom);
      cin = 1'($urandom);
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
