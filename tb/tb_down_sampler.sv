// tb_down_sampler: feeds tagged Gaussian pixels for a 30 x 25 frame, with
// gaps, and checks that exactly the pixels at even offsets from tag (14,14)
// come out, in order, as the integer part of the 8.10 value, that out_sof
// marks the first one and that the octave-1 frame is (30-13)/2 x (25-13)/2.
module tb_down_sampler;
  import sift_pkg::*;
  localparam int W = 30, H = 25;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  gpix_t in_g = '0;
  coord_t in_x = '0, in_y = '0;
  logic out_valid, out_sof;
  pix_t out_pix;
  int exp_q[$];
  int nout = 0;

  down_sampler dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      automatic int e = exp_q.pop_front();
      checks += 2;
      if (int'(out_pix) != e) begin
        failures++; $display("FAIL pixel %0d: %0d vs %0d", nout, out_pix, e);
      end
      if (out_sof != (nout == 0)) begin
        failures++; $display("FAIL sof at %0d", nout);
      end
      nout++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic gpix_t g = gpix_t'($urandom);
        if (x >= 14 && y >= 14 && (x - 14) % 2 == 0 && (y - 14) % 2 == 0)
          exp_q.push_back(int'(g) / 1024);
        @(negedge clk);
        in_valid = 1; in_g = g; in_x = coord_t'(x); in_y = coord_t'(y);
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
    repeat (5) @(negedge clk);
    checks += 2;
    if (nout != ((W-13)/2) * ((H-13)/2)) begin
      failures++; $display("FAIL count %0d", nout);
    end
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL %0d pixels missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
