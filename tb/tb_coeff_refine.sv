// tb_coeff_refine: feeds true multiples of x as the XCoeff inputs and checks
// that every refined product equals x times the HEVC constant of its angle.
module tb_coeff_refine;
  import iqit_pkg::*;
  coef_t  x;
  xbase_t xb;
  prod_t  prod [33];
  int checks = 0, failures = 0;

  coeff_refine dut (.xb(xb), .x(x), .prod(prod));

  // Constants of angle t*pi/64 in HEVC (t = 0: DC weight), written out.
  int ctab [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73,
                    70, 67, 64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22,
                    18, 13, 9, 4, 0};

  task automatic chk(int got, int exp, string name);
    checks++;
    if (got != exp) begin
      failures++;
      $display("x=%0d %s got %0d exp %0d", x, name, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int i = 0; i < 1000; i++) begin
      case (i)
        0: v = 0;  1: v = 1;  2: v = -1;  3: v = 32767;  4: v = -32768;
        default: v = int'($signed(16'($urandom)));
      endcase
      x = coef_t'(v);
      xb = '{x1: prod_t'(v), x2: prod_t'(2*v), x4: prod_t'(4*v), x9: prod_t'(9*v),
             x18: prod_t'(18*v), x36: prod_t'(36*v), x64: prod_t'(64*v), x90: prod_t'(90*v)};
      #1;
      for (int t = 0; t < 33; t++) chk(int'(prod[t]), ctab[t] * v, $sformatf("prod[%0d]", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
