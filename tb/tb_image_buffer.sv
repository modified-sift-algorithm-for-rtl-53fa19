// tb_image_buffer: streams two random frames (8 x 20) with random gaps and
// checks, after every pixel, that tap D_k holds the pixel k rows above the
// newest one and that the coordinate tag is right. Also checks that the
// taps hold still while no pixel arrives.
module tb_image_buffer;
  import sift_pkg::*;
  localparam int W = 8, H = 20;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  pix_t in_pix = '0;
  logic out_valid;
  pix_t taps [TAPS];
  coord_t out_x, out_y;
  int img [H][W];

  image_buffer #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          automatic pix_t p = pix_t'($urandom);
          img[y][x] = p;
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0) && (f == 0); in_pix = p;
          @(negedge clk);
          in_valid = 0;
          checks++;
          if (!out_valid || out_x != coord_t'(x) || out_y != coord_t'(y)) begin
            failures++; $display("FAIL tag (%0d,%0d) got (%0d,%0d) v=%0d", x, y, out_x, out_y, out_valid);
          end
          for (int k = 0; k < TAPS; k++)
            if (y >= k) begin
              checks++;
              if (taps[k] != pix_t'(img[y-k][x])) begin
                failures++; $display("FAIL D%0d at (%0d,%0d): %h vs %h", k, x, y, taps[k], img[y-k][x]);
              end
            end
          // idle cycles: nothing may move
          repeat ($urandom_range(0, 2)) begin
            @(negedge clk);
            checks++;
            if (out_valid || taps[0] != p) begin
              failures++; $display("FAIL taps moved while idle");
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
