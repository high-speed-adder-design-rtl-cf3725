// tb_long_carry: exhaustive over 8-bit A, B and carry-in. The group Ling
// signals are formed from the operands by the testbench; the expected carry
// out is bit 8 of A + B + Cin and the expected long pseudo-carry H8:0 is
// (A8 AND B8) OR (carry into bit 8).
module tb_long_carry;
  import naff_pkg::*;

  logic phi;
  dr_t  h41, i41, h85, i85, h80, cout;
  gpk_t gpk8;
  int checks = 0, failures = 0;

  long_carry dut (.phi(phi), .h41(h41), .i41(i41), .h85(h85), .i85(i85),
                  .gpk8(gpk8), .h80(h80), .cout(cout));

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
    logic [8:0] o, s;
    logic [3:0] l3, h3;
    for (int v = 0; v < (1 << 17); v++) begin
      {y, x, c} = v[16:0];
      o  = {x, c} | {y, c};
      l3 = {1'b0, x[2:0]} + {1'b0, y[2:0]};
      h3 = {1'b0, x[6:4]} + {1'b0, y[6:4]};
      h41  = dr_of(l3[3] | (x[3] & y[3]));
      h85  = dr_of(h3[3] | (x[7] & y[7]));
      i41  = dr_of(&o[3:0]);
      i85  = dr_of(&o[7:4]);
      gpk8 = (x[7] & y[7]) ? 3'b100 : (x[7] | y[7]) ? 3'b010 : 3'b001;
      phi  = 1'b1;
      #1;
      s = {1'b0, x} + {1'b0, y} + {8'b0, c};
      checks++;
      if (cout !== dr_of(s[8])) begin
        failures++;
        if (failures < 10) $display("FAIL cout x=%h y=%h c=%0d got %b", x, y, c, cout);
      end
      checks++;
      if (h80 !== dr_of((x[7] & y[7]) | (s[7] ^ x[7] ^ y[7]))) begin
        failures++;
        if (failures < 10) $display("FAIL h80 x=%h y=%h c=%0d got %b", x, y, c, h80);
      end
      if (v % 64 == 0) begin
        phi = 1'b0;
        #1;
        checks++;
        if (h80 !== 2'b00 || cout !== 2'b00) begin
          failures++;
          $display("FAIL precharge");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
