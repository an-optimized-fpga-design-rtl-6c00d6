// tb_xcoeff: compares every XCoeff multiple with a true product for
// corner values and random 16-bit inputs.
module tb_xcoeff;
  import iqit_pkg::*;
  coef_t  x;
  xbase_t xb;
  int checks = 0, failures = 0;

  xcoeff dut (.x(x), .xb(xb));

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
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: v = 0;  1: v = 1;  2: v = -1;  3: v = 32767;  4: v = -32768;
        default: v = int'($signed(16'($urandom)));
      endcase
      x = coef_t'(v);
      #1;
      chk(int'(xb.x1), v, "x1");
      chk(int'(xb.x2), 2 * v, "x2");
      chk(int'(xb.x4), 4 * v, "x4");
      chk(int'(xb.x9), 9 * v, "x9");
      chk(int'(xb.x18), 18 * v, "x18");
      chk(int'(xb.x36), 36 * v, "x36");
      chk(int'(xb.x64), 64 * v, "x64");
      chk(int'(xb.x90), 90 * v, "x90");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
