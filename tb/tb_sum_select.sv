// tb_sum_select: every bit code with every carry-in and both candidate
// carries. Expected sum: (A xor B) xor (Cin ? c1 : c0), on both rails.
module tb_sum_select;
  import naff_pkg::*;

  logic phi;
  gpk_t gpk;
  dr_t  cin, c0, c1, s;
  int checks = 0, failures = 0;

  sum_select dut (.phi(phi), .gpk(gpk), .cin(cin), .c0(c0), .c1(c1), .s(s));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p, e;
    for (int code = 0; code < 3; code++) begin
      for (int v = 0; v < 8; v++) begin
        gpk = 3'b100 >> code;          // G, P, K in turn
        p   = (code == 1);
        cin = dr_of(v[0]);
        c0  = dr_of(v[1]);
        c1  = dr_of(v[2]);
        phi = 1'b1;
        #1;
        e = p ^ (v[0] ? v[2] : v[1]);
        checks++;
        if (s !== dr_of(e)) begin
          failures++;
          $display("FAIL code=%0d cin=%0d c0=%0d c1=%0d s=%b", code, v[0], v[1], v[2], s);
        end
        phi = 1'b0;
        #1;
        checks++;
        if (s !== 2'b00) begin
          failures++;
          $display("FAIL precharge");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
