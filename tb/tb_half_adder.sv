// tb_half_adder: exhaustive self-check of the modified-XOR half adder.
//
// All four input pairs; {cout, sum} must equal a + b.  Prints one TB_RESULT line; a time
// watchdog ends a hung run as a failure.
module tb_half_adder;
  logic a, b, sum, cout;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(a + b)) begin
        failures++;
        $display("FAIL a=%b b=%b got %b%b", a, b, cout, sum);
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
