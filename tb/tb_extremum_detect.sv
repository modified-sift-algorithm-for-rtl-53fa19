// tb_extremum_detect: random 3x3x3 DoG blocks, half of them with a planted
// maximum or minimum (and some with a tie against one neighbour), compared
// with the reference extremum test.
module tb_extremum_detect;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  int checks = 0, failures = 0, n_ext = 0, n_tie = 0;

  dog_t prev [9], cur [9], next [9];
  logic is_ext;

  extremum_detect dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      automatic int p[9], c[9], n[9];
      automatic int mode = $urandom_range(0, 4);
      automatic int span = (t % 2) ? 255 : 6;
      for (int k = 0; k < 9; k++) begin
        p[k] = $urandom_range(0, 2*span) - span;
        c[k] = $urandom_range(0, 2*span) - span;
        n[k] = $urandom_range(0, 2*span) - span;
      end
      if (mode == 1) c[4] = span + 1;           // maximum
      if (mode == 2) c[4] = -span - 1;          // minimum
      if (mode == 3) begin                      // maximum with one tie
        c[4] = span + 1;
        case ($urandom_range(0, 2))
          0: p[$urandom_range(0, 8)] = span + 1;
          1: n[$urandom_range(0, 8)] = span + 1;
          default: c[$urandom_range(0, 3)] = span + 1;
        endcase
        n_tie++;
      end
      for (int k = 0; k < 9; k++) begin
        prev[k] = dog_t'(p[k]); cur[k] = dog_t'(c[k]); next[k] = dog_t'(n[k]);
      end
      #1;
      checks++;
      if (is_ext) n_ext++;
      if (is_ext != ref_ext(p, c, n)) begin
        failures++; $display("FAIL case %0d mode %0d: %0d", t, mode, is_ext);
      end
    end
    checks++;
    if (n_ext < 1000 || n_tie == 0) begin
      failures++; $display("FAIL too few extrema %0d", n_ext);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
