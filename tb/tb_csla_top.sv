// tb_csla_top: end-to-end self-check of the three 64-bit square-root carry-select adders.
//
// Runs csla_top at its default parameters (WIDTH = 64).  The conventional adder gets each
// new operand set (a, b, cin); the BEC based adder gets the set before it and the OLB
// adder the one before that, so every adder sees the whole sequence but the three never
// hold the same operands at once (a swapped connection in the top shows as a mismatch).
// Every result is compared with a + b + cin from the built-in addition.  The testbench also counts how often each
// mechanism of the carry-select structure is exercised and counts a failure for any that
// never happens:
//   - every group selecting its carry-in-0 result and its carry-in-1 result
//   - a carry entering a group and propagating through all its bits (the full
//     excess-1 chain of a BEC group, the full carry-in-1 chain of an OLB group)
//   - a carry rippling from cin through all 64 bits, and a carry-out of 1
// Group boundaries (bits 2, 4, 7, 11, 16, 22, 29, 37, 45, 54 for the 2-bit ripple-carry
// adder and groups of 2, 3, 4, 5, 6, 7, 8, 8, 9, 10 bits) are written out here from the
// published 64-bit grouping, not read from the design.  Prints one TB_RESULT line; a time
// watchdog ends a hung run as a failure.
module tb_csla_top;
  localparam int unsigned W     = 64;
  localparam int unsigned NG    = 10;
  localparam int unsigned NRAND = 20000;
  localparam int unsigned GLSB [NG+1] = '{2, 4, 7, 11, 16, 22, 29, 37, 45, 54, 64};

  logic [W-1:0] a, b, conv_sum, bec_sum, olb_sum;
  logic         cin, conv_cout, bec_cout, olb_cout;
  logic [W-1:0] a1, b1, a2, b2;   // operand sets one and two steps old
  logic         cin1, cin2;
  int checks = 0, failures = 0;

  int sel0_cnt [NG];     // group k chose its carry-in-0 result
  int sel1_cnt [NG];     // group k chose its carry-in-1 result
  int prop_cnt [NG];     // a carry entered group k and passed through all its bits
  int ripple_all_cnt = 0;
  int cout_cnt = 0;

  csla_top dut (
    .conv_a(a), .conv_b(b), .conv_cin(cin), .conv_sum(conv_sum), .conv_cout(conv_cout),
    .bec_a (a1), .bec_b (b1), .bec_cin (cin1), .bec_sum (bec_sum), .bec_cout (bec_cout),
    .olb_a (a2), .olb_b (b2), .olb_cin (cin2), .olb_sum (olb_sum), .olb_cout (olb_cout)
  );

  function automatic logic [W:0] add(logic [W-1:0] x, logic [W-1:0] y, logic c);
    return {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
  endfunction

  task automatic check();
    logic [W:0]   expect_v;
    logic [W:0]   carry_into;   // carry_into[k]: carry into bit k of a + b + cin
    logic [W-1:0] p;
    expect_v   = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    carry_into = expect_v ^ {1'b0, a} ^ {1'b0, b};
    p          = a ^ b;
    #1;
    checks += 3;
    if ({conv_cout, conv_sum} !== expect_v) begin
      failures++;
      $display("FAIL conv a=%h b=%h cin=%b got %b_%h", a, b, cin, conv_cout, conv_sum);
    end
    if ({bec_cout, bec_sum} !== add(a1, b1, cin1)) begin
      failures++;
      $display("FAIL bec  a=%h b=%h cin=%b got %b_%h", a1, b1, cin1, bec_cout, bec_sum);
    end
    if ({olb_cout, olb_sum} !== add(a2, b2, cin2)) begin
      failures++;
      $display("FAIL olb  a=%h b=%h cin=%b got %b_%h", a2, b2, cin2, olb_cout, olb_sum);
    end
    for (int k = 0; k < NG; k++) begin
      int unsigned lsb = GLSB[k];
      int unsigned n   = GLSB[k+1] - GLSB[k];
      logic all_p = 1'b1;
      for (int unsigned j = lsb; j < lsb + n; j++) all_p &= p[j];
      if (carry_into[lsb]) sel1_cnt[k]++;
      else                 sel0_cnt[k]++;
      if (carry_into[lsb] && all_p) prop_cnt[k]++;
    end
    if (cin && (&p)) ripple_all_cnt++;
    if (expect_v[W]) cout_cnt++;
    // age the operand sets for the other two adders
    a2 = a1; b2 = b1; cin2 = cin1;
    a1 = a;  b1 = b;  cin1 = cin;
  endtask

  function automatic logic [W-1:0] rand64();
    return {$urandom, $urandom};
  endfunction

  task automatic report(string what, int cnt);
    $display("  %-34s %0d", what, cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < NG; k++) begin
      sel0_cnt[k] = 0; sel1_cnt[k] = 0; prop_cnt[k] = 0;
    end
    a1 = '0; b1 = '0; cin1 = 1'b0;
    a2 = '0; b2 = '0; cin2 = 1'b0;
    // a carry from cin through every bit
    a = '1; b = '0; cin = 1'b1; check();
    a = 64'h5555_5555_5555_5555; b = 64'hAAAA_AAAA_AAAA_AAAA; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b0; check();
    a = '0; b = '0; cin = 1'b0; check();
    // for each group: generate a carry just below it and let it cross the whole group
    for (int k = 0; k < NG; k++) begin
      a   = rand64();
      b   = ~a;
      a[GLSB[k]-1] = 1'b1;
      b[GLSB[k]-1] = 1'b1;
      cin = 1'($urandom);
      check();
    end
    for (int v = 0; v < NRAND; v++) begin
      a   = rand64();
      b   = rand64();
      cin = 1'($urandom);
      check();
      b   = ~a ^ (rand64() & rand64() & rand64());
      check();
    end
    // two more steps so the last sets reach the BEC and OLB adders
    a = '0; b = '0; cin = 1'b0; check();
    check();
    $display("mechanism counts:");
    for (int k = 0; k < NG; k++) begin
      report($sformatf("group %0d selects carry-in-0 result", k), sel0_cnt[k]);
      report($sformatf("group %0d selects carry-in-1 result", k), sel1_cnt[k]);
      report($sformatf("group %0d carry crosses whole group", k), prop_cnt[k]);
    end
    report("carry ripples cin -> cout", ripple_all_cnt);
    report("carry-out of 1", cout_cnt);
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
