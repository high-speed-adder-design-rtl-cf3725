// tb_rc_gate: both pseudo-carry variants, exhaustive over 8-bit A, B and
// the carry-in. The gate inputs (G3:1, I4:1, G7:5, I8:5, bit-4 code) are
// formed from the operands by the testbench; the expected outputs are carry
// bits of integer additions: G^0 is the carry with carry-in 0, G^1 the
// carry with the real carry-in (I4:1 already contains Cin). Precharge must
// leave every output rail low.
module tb_rc_gate;
  import naff_pkg::*;

  logic phi;
  dr_t  g31, i41, g75, i85;
  gpk_t gpk4;
  dr_t  g30_0, g70_0, g30_1, g70_1;
  int checks = 0, failures = 0;

  rc_gate #(.PC(1'b0)) dut0 (.phi(phi), .g31(g31), .i41(i41), .g75(g75), .i85(i85),
                             .gpk4(gpk4), .g30(g30_0), .g70(g70_0));
  rc_gate #(.PC(1'b1)) dut1 (.phi(phi), .g31(g31), .i41(i41), .g75(g75), .i85(i85),
                             .gpk4(gpk4), .g30(g30_1), .g70(g70_1));

  // Carry out of operand bits 1..n (x[0] is bit 1) for a given carry-in.
  function automatic logic carry_of(logic [7:0] x, logic [7:0] y, logic c, int n);
    logic [8:0] m, s;
    m = (9'd1 << n) - 9'd1;
    s = ({1'b0, x} & m) + ({1'b0, y} & m) + {8'b0, c};
    return s[n];
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, y;
    logic       c;
    logic [8:0] o;
    for (int v = 0; v < (1 << 17); v++) begin
      {y, x, c} = v[16:0];
      o = {x, c} | {y, c};                     // OR propagates, o[0] = Cin
      phi  = 1'b1;
      g31  = dr_of(carry_of(x, y, 1'b0, 3));
      i41  = dr_of(&o[3:0]);
      g75  = dr_of(carry_of(x >> 4, y >> 4, 1'b0, 3));
      i85  = dr_of(&o[7:4]);
      gpk4 = (x[3] & y[3]) ? 3'b100 : (x[3] | y[3]) ? 3'b010 : 3'b001;
      #1;
      chk(g30_0 === dr_of(carry_of(x, y, 1'b0, 3)), "G^0_3:0");
      chk(g70_0 === dr_of(carry_of(x, y, 1'b0, 7)), "G^0_7:0");
      chk(g30_1 === dr_of(carry_of(x, y, c, 3)),    "G^1_3:0");
      chk(g70_1 === dr_of(carry_of(x, y, c, 7)),    "G^1_7:0");
      if (v % 64 == 0) begin
        phi = 1'b0;
        #1;
        chk(g30_0 === 2'b00 && g70_0 === 2'b00 && g30_1 === 2'b00 && g70_1 === 2'b00,
            "precharge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
