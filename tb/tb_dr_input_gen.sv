// tb_dr_input_gen: checks the input rail generator at its default width.
// Random inputs are applied in both clock phases: with phi low both rails
// of every bit must be 0, with phi high the true rail must equal the input
// and the complement rail its inverse.
module tb_dr_input_gen;
  import naff_pkg::*;

  localparam int unsigned W = 17;
  logic         phi;
  logic [W-1:0] x;
  dr_t  [W-1:0] y;
  int checks = 0, failures = 0;

  dr_input_gen #(.W(W)) dut (.phi(phi), .x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      x   = W'($urandom);
      phi = n[0];
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (phi ? (y[i].h !== x[i] || y[i].l !== !x[i]) : (y[i] !== 2'b00)) begin
          failures++;
          if (failures < 10) $display("FAIL phi=%0d bit %0d x=%0d y=%b", phi, i, x[i], y[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
