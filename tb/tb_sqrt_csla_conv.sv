// tb_sqrt_csla_conv: self-check of the conventional square-root carry-select adder at every
// supported width.
//
// Instantiates sqrt_csla_conv at WIDTH = 4, 8, 16, 32 and 64 on shared 64-bit stimulus (each
// instance takes the low WIDTH bits).  Stimulus: corner cases (zero, all ones, a carry
// that ripples through every bit, alternating patterns), then random operands and, to
// exercise long carry chains, random operands whose b is the complement of a in most
// bits.  Each instance's {cout, sum} must equal a + b + cin from the built-in addition.
// Prints one TB_RESULT line; a time watchdog ends a hung run as a failure.
module tb_sqrt_csla_conv;
  localparam int unsigned NINST = 5;
  localparam int unsigned NRAND = 20000;

  logic [63:0]      a, b;
  logic             cin;
  logic [NINST-1:0] err;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NINST; i++) begin : g_inst
    localparam int unsigned W = 4 << i;
    logic [W-1:0] sum;
    logic         cout;
    sqrt_csla_conv #(.WIDTH(W)) dut (
      .a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .sum(sum), .cout(cout)
    );
    assign err[i] = ({cout, sum} != ({1'b0, a[W-1:0]} + {1'b0, b[W-1:0]} + {{W{1'b0}}, cin}));
  end

  task automatic check();
    #1;
    checks += NINST;
    if (err != '0) begin
      failures += $countones(err);
      if (failures < 20) $display("FAIL a=%h b=%h cin=%b err=%b", a, b, cin, err);
    end
  endtask

  function automatic logic [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [63:0] corner [6];
    corner = '{64'h0, 64'hFFFF_FFFF_FFFF_FFFF, 64'h5555_5555_5555_5555,
               64'hAAAA_AAAA_AAAA_AAAA, 64'h1, 64'h8000_0000_0000_0000};
    foreach (corner[i]) begin
      foreach (corner[j]) begin
        for (int c = 0; c < 2; c++) begin
          a = corner[i]; b = corner[j]; cin = c[0];
          check();
        end
      end
    end
    for (int v = 0; v < NRAND; v++) begin
      a   = rand64();
      b   = rand64();
      cin = 1'($urandom);
      check();
      // mostly complementary operands: long propagate runs broken by a few random bits
      b   = ~a ^ (rand64() & rand64() & rand64() & rand64());
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
