// tb_edge_response: random DoG windows (small and full range, plus ridges,
// blobs and saddles) compared with a real-valued curvature-ratio reference
// Tr^2/Det >= (r+1)^2/r or Det <= 0, for r = 10 and r = 3.
module tb_edge_response;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  int checks = 0, failures = 0, n_edge = 0, n_pass = 0;

  dog_t win [9];
  logic e10, e3;

  edge_response #(.EDGE_R(10)) dut10 (.win, .is_edge(e10));
  edge_response #(.EDGE_R(3))  dut3  (.win, .is_edge(e3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      automatic int w[9];
      automatic int kind = t % 4;
      automatic int span = (t % 8 < 4) ? 8 : 255;
      for (int k = 0; k < 9; k++) w[k] = $urandom_range(0, 2*span) - span;
      if (kind == 1) begin        // blob: centre well above all neighbours
        w[4] = 255;
        for (int k = 0; k < 9; k++) if (k != 4) w[k] = $urandom_range(0, 40);
      end
      if (kind == 2) begin        // vertical ridge
        for (int r = 0; r < 3; r++) begin
          w[r*3+1] = 100 + $urandom_range(0, 3);
          w[r*3] = 0; w[r*3+2] = $urandom_range(0, 3);
        end
      end
      for (int k = 0; k < 9; k++) win[k] = dog_t'(w[k]);
      #1;
      checks += 2;
      if (e10) n_edge++; else n_pass++;
      if (e10 != ref_edge(w, 10)) begin
        failures++; $display("FAIL r=10 case %0d kind %0d", t, kind);
      end
      if (e3 != ref_edge(w, 3)) begin
        failures++; $display("FAIL r=3 case %0d kind %0d", t, kind);
      end
    end
    checks++;
    if (n_edge < 100 || n_pass < 100) begin
      failures++; $display("FAIL poor coverage %0d/%0d", n_edge, n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
