// tb_bec: exhaustive self-check of the binary to excess-1 converter.
//
// Instantiates bec for N = 1..10 (an 11-bit converter is the largest the adders use) and
// runs every 11-bit input; each instance sees the low N+1 bits and must return them plus
// one, modulo 2**(N+1).  Prints one TB_RESULT line; a time watchdog ends a hung run as a
// failure.
module tb_bec;
  localparam int unsigned MAXN = 10;

  logic [MAXN:0]   x;
  logic [MAXN-1:0] err;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < MAXN; i++) begin : g_inst
    localparam int unsigned N = i + 1;
    logic [N:0] y;
    bec #(.N(N)) dut (.x(x[N:0]), .y(y));
    assign err[i] = (y != (x[N:0] + 1'b1));
  end

  initial begin
    for (int v = 0; v < (1 << (MAXN + 1)); v++) begin
      x = (MAXN + 1)'(v);
      #1;
      checks += MAXN;
      if (err != '0) begin
        failures += $countones(err);
        if (failures < 20) $display("FAIL x=%h err=%b", x, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
