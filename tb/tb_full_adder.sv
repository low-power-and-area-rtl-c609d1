// tb_full_adder: exhaustive self-check of the full adder built from two half adders.
//
// All eight input combinations; {cout, sum} must equal a + b + cin.  Prints one TB_RESULT
// line; a time watchdog ends a hung run as a failure.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(a + b + cin)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b got %b%b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
