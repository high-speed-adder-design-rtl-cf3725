// tb_i4_gate: exhaustive over the 256 operand pairs of four bits. Expected
// I = 1 exactly when every bit position has at least one operand bit set.
module tb_i4_gate;
  import naff_pkg::*;

  logic      phi;
  dr_t [3:0] a, b;
  dr_t       i4;
  int checks = 0, failures = 0;

  i4_gate dut (.phi(phi), .a(a), .b(b), .i4(i4));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] x, y;
    logic       e;
    for (int v = 0; v < 256; v++) begin
      {y, x} = v[7:0];
      for (int i = 0; i < 4; i++) begin
        a[i] = dr_of(x[i]);
        b[i] = dr_of(y[i]);
      end
      phi = 1'b1;
      #1;
      e = ((x | y) == 4'hF);
      checks++;
      if (i4 !== dr_of(e)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h i4=%b exp %0d", x, y, i4, e);
      end
      phi = 1'b0;
      #1;
      checks++;
      if (i4 !== 2'b00) begin
        failures++;
        $display("FAIL precharge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
