// tb_g3h4_gate: exhaustive over the 256 operand pairs of a 4-bit group.
// Expected values come from integer addition: G3 is the carry out of the
// low three bits with no carry in, H4 is G3 OR (A4 AND B4). Both rails are
// checked, and all rails must be low in precharge.
module tb_g3h4_gate;
  import naff_pkg::*;

  logic      phi;
  dr_t [4:1] a, b;
  dr_t       g3, h4;
  int checks = 0, failures = 0;

  g3h4_gate dut (.phi(phi), .a(a), .b(b), .g3(g3), .h4(h4));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] x, y;
    logic [3:0] s3;
    logic       eg, eh;
    for (int v = 0; v < 256; v++) begin
      {y, x} = v[7:0];
      for (int i = 1; i <= 4; i++) begin
        a[i] = dr_of(x[i-1]);
        b[i] = dr_of(y[i-1]);
      end
      phi = 1'b1;
      #1;
      s3 = {1'b0, x[2:0]} + {1'b0, y[2:0]};
      eg = s3[3];
      eh = eg | (x[3] & y[3]);
      checks++;
      if (g3 !== dr_of(eg) || h4 !== dr_of(eh)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h g3=%b h4=%b exp %0d %0d", x, y, g3, h4, eg, eh);
      end
      phi = 1'b0;
      #1;
      checks++;
      if (g3 !== 2'b00 || h4 !== 2'b00) begin
        failures++;
        $display("FAIL precharge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
