// tb_line_buffer_5x5: the 5 x 5 test image used to demonstrate the line
// buffer (pixels 1a 4b 68 60 35 / 3a 62 c0 a3 65 / 6e 9e c5 bb 9f /
// 5e e0 b8 d1 ab / 9f a1 90 b9 b5, raster order) streamed at one pixel per
// clock through an image buffer configured for 5-pixel lines. After each
// pixel, D0 must be that pixel and D_k the pixel k rows above it, for
// every row that exists in the frame; the whole image must enter in 25
// clocks and D4 must end on the first pixel of the last column.
module tb_line_buffer_5x5;
  import sift_pkg::*;
  localparam int W = 5, H = 5;
  localparam logic [7:0] IMG [25] = '{
    8'h1a, 8'h4b, 8'h68, 8'h60, 8'h35,
    8'h3a, 8'h62, 8'hc0, 8'ha3, 8'h65,
    8'h6e, 8'h9e, 8'hc5, 8'hbb, 8'h9f,
    8'h5e, 8'he0, 8'hb8, 8'hd1, 8'hab,
    8'h9f, 8'ha1, 8'h90, 8'hb9, 8'hb5};
  int checks = 0, failures = 0, clocks = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  pix_t in_pix = '0;
  logic out_valid;
  pix_t taps [TAPS];
  coord_t out_x, out_y;

  image_buffer #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int p = 0; p < W*H; p++) begin
      in_valid = 1; in_sof = (p == 0); in_pix = IMG[p];
      @(negedge clk);
      clocks++;
      checks++;
      if (!out_valid || out_x != coord_t'(p % W) || out_y != coord_t'(p / W)) begin
        failures++; $display("FAIL tag at pixel %0d", p);
      end
      for (int k = 0; k <= p / W; k++) begin
        checks++;
        if (taps[k] != IMG[p - k*W]) begin
          failures++; $display("FAIL D%0d after pixel %0d: %h vs %h", k, p, taps[k], IMG[p - k*W]);
        end
      end
    end
    in_valid = 0;
    checks += 2;
    if (clocks != 25) begin
      failures++; $display("FAIL took %0d clocks", clocks);
    end
    if (taps[4] != 8'h35) begin
      failures++; $display("FAIL final D4 %h", taps[4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
