// tb_gpk_cell: all four operand combinations in evaluate, plus precharge.
// Expected code: both ones -> G, exactly one -> P, both zeros -> K; in
// precharge (or with precharged inputs) no output may be high.
module tb_gpk_cell;
  import naff_pkg::*;

  logic phi;
  dr_t  a, b;
  gpk_t gpk;
  int checks = 0, failures = 0;

  gpk_cell dut (.phi(phi), .a(a), .b(b), .gpk(gpk));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gpk_t exp;
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 4; v++) begin
        phi = 1'b1;
        a = dr_of(v[0]);
        b = dr_of(v[1]);
        #1;
        exp = (v == 3) ? 3'b100 : (v == 0) ? 3'b001 : 3'b010;
        checks++;
        if (gpk !== exp) begin
          failures++;
          $display("FAIL a=%0d b=%0d gpk=%b exp=%b", v[0], v[1], gpk, exp);
        end
        // precharge: clock low, inputs still valid
        phi = 1'b0;
        #1;
        checks++;
        if (gpk !== 3'b000) begin
          failures++;
          $display("FAIL precharge gpk=%b", gpk);
        end
        // clock high, inputs still precharged
        phi = 1'b1; a = '0; b = '0;
        #1;
        checks++;
        if (gpk !== 3'b000) begin
          failures++;
          $display("FAIL null inputs gpk=%b", gpk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
