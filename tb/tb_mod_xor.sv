// tb_mod_xor: exhaustive self-check of the modified XOR gate.
//
// Applies all four input pairs and compares y with a ^ b and the shared AND term ab with
// a & b.  Prints one TB_RESULT line; a time watchdog ends a hung run as a failure.
module tb_mod_xor;
  logic a, b, y, ab;
  int checks = 0, failures = 0;

  mod_xor dut (.a(a), .b(b), .y(y), .ab(ab));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 2;
      if (y !== (a ^ b)) begin failures++; $display("FAIL y a=%b b=%b y=%b", a, b, y); end
      if (ab !== (a & b)) begin failures++; $display("FAIL ab a=%b b=%b ab=%b", a, b, ab); end
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
