// tb_low_contrast: all 512 DoG values against |d| <= threshold, for the
// default threshold 1 and for threshold 7.
module tb_low_contrast;
  import sift_pkg::*;
  int checks = 0, failures = 0;

  dog_t d;
  logic low1, low7;

  low_contrast              dut1 (.d, .is_low(low1));
  low_contrast #(.LC_TH(7)) dut7 (.d, .is_low(low7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -256; v < 256; v++) begin
      automatic int a = (v < 0) ? -v : v;
      d = dog_t'(v);
      #1;
      checks += 2;
      if (low1 != (a <= 1)) begin
        failures++; $display("FAIL th=1 v=%0d", v);
      end
      if (low7 != (a <= 7)) begin
        failures++; $display("FAIL th=7 v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
