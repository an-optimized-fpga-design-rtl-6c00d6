// tb_idst4: compares the four unrounded inverse-DST sums with the written-out
// HEVC DST matrix for corner and random 16-bit inputs.
module tb_idst4;
  import iqit_pkg::*;
  import iqit_ref_pkg::*;
  coef_t x [4];
  logic signed [31:0] y [4];
  int checks = 0, failures = 0;

  idst4 dut (.x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi [4];
    longint e;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 4; i++) begin
        case (n)
          0: xi[i] = 32767;
          1: xi[i] = -32768;
          2: xi[i] = (i % 2) ? 32767 : -32768;
          3: xi[i] = (i == n % 4) ? 1 : 0;
          default: xi[i] = (n % 2) ? int'($signed(16'($urandom))) : $urandom_range(0, 200) - 100;
        endcase
        x[i] = coef_t'(xi[i]);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        e = 0;
        for (int j = 0; j < 4; j++) e += longint'(dst_entry(j, k)) * xi[j];
        checks++;
        if (longint'(y[k]) != e) begin
          failures++;
          if (failures < 10) $display("y[%0d] got %0d exp %0d", k, y[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
