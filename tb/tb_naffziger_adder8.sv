// tb_naffziger_adder8: exhaustive end-to-end test of the 8-bit adder at its
// only configuration.
//
// Every one of the 2^17 combinations of A, B and carry-in gets one clock
// cycle: phi low (precharge) with the new operands applied, then phi high
// (evaluate). While phi is low every output rail must be 0; while phi is
// high each sum bit and the carry out must sit on exactly one rail and match
// A + B + Cin computed by the testbench's own integer addition, within the
// same evaluate phase (the adder has no latency beyond its gate delays).
// It counts how often each mechanism of the adder was exercised: the two
// pseudo-carry selections, a carry crossing from the low to the high group,
// a carry propagating through all eight bits, a carry out, a precharge.
module tb_naffziger_adder8;

  logic       phi;
  logic [8:1] a, b;
  logic       cin;
  logic [8:1] sum_h, sum_l;
  logic       cout_h, cout_l;

  int checks = 0, failures = 0;
  int n_cin0 = 0, n_cin1 = 0, n_group_carry = 0, n_full_prop = 0;
  int n_cout = 0, n_precharge = 0;

  naffziger_adder8 dut (
    .phi(phi), .a(a), .b(b), .cin(cin),
    .sum_h(sum_h), .sum_l(sum_l), .cout_h(cout_h), .cout_l(cout_l)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: a=%02h b=%02h cin=%0d sum_h=%02h sum_l=%02h cout=%0d/%0d",
                 what, a, b, cin, sum_h, sum_l, cout_h, cout_l);
    end
  endtask

  // Watchdog: the run needs 2^17 cycles of 2 time units each.
  initial begin
    #(4 * 131072 + 100);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] exp;
    logic [4:0] low;
    phi = 1'b0; a = '0; b = '0; cin = 1'b0;
    for (int v = 0; v < (1 << 17); v++) begin
      // precharge with new operands
      phi = 1'b0;
      {b, a, cin} = v[16:0];
      #1;
      check(sum_h == '0 && sum_l == '0 && !cout_h && !cout_l, "precharge");
      n_precharge++;
      // evaluate
      phi = 1'b1;
      #1;
      exp = {1'b0, a} + {1'b0, b} + {8'b0, cin};
      low = {1'b0, a[4:1]} + {1'b0, b[4:1]} + {4'b0, cin};
      check(sum_h == exp[7:0], "sum true rail");
      check(sum_l == ~exp[7:0], "sum complement rail");
      check(cout_h == exp[8] && cout_l == !exp[8], "carry out");
      if (cin) n_cin1++; else n_cin0++;
      if (low[4]) n_group_carry++;
      if (cin && ((a ^ b) == 8'hFF)) n_full_prop++;
      if (exp[8]) n_cout++;
    end
    phi = 1'b0;
    #1;
    check(n_cin0 > 0, "pseudo-carry 0 selected");
    check(n_cin1 > 0, "pseudo-carry 1 selected");
    check(n_group_carry > 0, "carry from low group into high group");
    check(n_full_prop > 0, "carry propagated through all bits");
    check(n_cout > 0, "carry out");
    check(n_precharge > 0, "precharge phase");
    $display("mechanisms: cin0=%0d cin1=%0d group_carry=%0d full_propagate=%0d cout=%0d precharge=%0d",
             n_cin0, n_cin1, n_group_carry, n_full_prop, n_cout, n_precharge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
