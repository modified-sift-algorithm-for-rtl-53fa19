// tb_window_generator: streams a random signed 9-bit image (10 x 12, with
// gaps) and checks after every pixel at x, y >= 2 that the window holds
// DoG(x-2+c, y-2+r) at index r*3+c, with the tag of the newest pixel.
module tb_window_generator;
  import sift_pkg::*;
  localparam int W = 10, H = 12;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  dog_t in_d = '0;
  coord_t in_x = '0, in_y = '0;
  logic out_valid;
  dog_t win [9];
  coord_t out_x, out_y;
  int img [H][W];

  window_generator #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

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
        automatic dog_t d = dog_t'($urandom);
        img[y][x] = int'(d);
        @(negedge clk);
        in_valid = 1; in_d = d; in_x = coord_t'(x); in_y = coord_t'(y);
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || out_x != coord_t'(x) || out_y != coord_t'(y)) begin
          failures++; $display("FAIL valid/tag at (%0d,%0d)", x, y);
        end
        if (x >= 2 && y >= 2)
          for (int k = 0; k < 9; k++) begin
            checks++;
            if (int'(win[k]) != img[y-2+k/3][x-2+k%3]) begin
              failures++; $display("FAIL win[%0d] at (%0d,%0d): %0d vs %0d", k, x, y, win[k], img[y-2+k/3][x-2+k%3]);
            end
          end
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
