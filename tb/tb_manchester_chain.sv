// tb_manchester_chain: every combination of the incoming group carry and
// the three bit codes. Each code is mapped back to an operand bit pair
// (G: 1+1, P: 1+0, K: 0+0) and the expected chain outputs are the carries
// of the integer addition of those three bit pairs plus the incoming carry.
module tb_manchester_chain;
  import naff_pkg::*;

  logic       phi;
  dr_t        gin;
  gpk_t [2:0] gpk;
  dr_t  [2:0] gout;
  int checks = 0, failures = 0;

  manchester_chain dut (.phi(phi), .gin(gin), .gpk(gpk), .gout(gout));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] x, y;
    logic       c;
    logic [3:0] s;
    int         code;
    for (int v = 0; v < 54; v++) begin
      c = v[0];
      code = v / 2;
      for (int j = 0; j < 3; j++) begin
        case (code % 3)
          0:       begin x[j] = 1'b1; y[j] = 1'b1; gpk[j] = 3'b100; end
          1:       begin x[j] = 1'b1; y[j] = 1'b0; gpk[j] = 3'b010; end
          default: begin x[j] = 1'b0; y[j] = 1'b0; gpk[j] = 3'b001; end
        endcase
        code = code / 3;
      end
      gin = dr_of(c);
      phi = 1'b1;
      #1;
      for (int j = 0; j < 3; j++) begin
        s = ({1'b0, x} & ((4'd2 << j) - 4'd1)) + ({1'b0, y} & ((4'd2 << j) - 4'd1)) + {3'b0, c};
        checks++;
        if (gout[j] !== dr_of(s[j+1])) begin
          failures++;
          if (failures < 10) $display("FAIL x=%b y=%b c=%0d stage %0d got %b", x, y, c, j, gout[j]);
        end
      end
      phi = 1'b0; gin = '0; gpk = '0;
      #1;
      checks++;
      if (gout !== '0) begin
        failures++;
        $display("FAIL precharge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
