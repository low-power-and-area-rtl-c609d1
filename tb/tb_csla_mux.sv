// tb_csla_mux: self-check of the carry-select multiplexer at its default width (4 bits).
//
// Runs every pair (d0, d1) with both select values and compares y with d1 when sel is 1
// and d0 otherwise.  Prints one TB_RESULT line; a time watchdog ends a hung run as a
// failure.
module tb_csla_mux;
  logic [3:0] d0, d1, y;
  logic       sel;
  int checks = 0, failures = 0;

  csla_mux dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    for (int v = 0; v < 512; v++) begin
      {sel, d1, d0} = 9'(v);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
