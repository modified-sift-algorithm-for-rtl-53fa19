// tb_dog_module: one octave's DoG module on a 26 x 24 frame (random texture
// with a bright blob) fed with random gaps. Checks all five DoG images and
// Gaussian image 3 at every centre whose window is in the frame against the
// reference model, the latency (9 clocks from in_valid) and the number of
// outputs.
module tb_dog_module;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int W = 26, H = 24;
  int checks = 0, failures = 0, nout = 0, nonzero = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  pix_t in_pix = '0;
  logic dog_valid;
  dog_t dog [NDOG];
  gpix_t g3;
  coord_t out_x, out_y;
  int img[];
  int dg[5][];
  int g3ref[];

  dog_module #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  logic [8:0] vhist = '0;
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (dog_valid != vhist[8]) begin
        failures++; $display("FAIL latency");
      end
    end
    vhist = {vhist[7:0], in_valid};
  end

  always @(negedge clk) begin
    if (rst_n && dog_valid && out_x >= 14 && out_y >= 14) begin
      automatic int q = (int'(out_y) - 7) * W + int'(out_x) - 7;
      nout++;
      for (int i = 0; i < NDOG; i++) begin
        checks++;
        if (int'(dog[i]) != 0) nonzero++;
        if (int'(dog[i]) != dg[i][q]) begin
          failures++; $display("FAIL dog%0d at %0d: %0d vs %0d", i, q, dog[i], dg[i][q]);
        end
      end
      checks++;
      if (int'(g3) != g3ref[q]) begin
        failures++; $display("FAIL g3 at %0d: %0d vs %0d", q, g3, g3ref[q]);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img = new[W*H];
    foreach (img[i]) begin
      automatic int x = i % W, y = i / W;
      automatic int r2 = (x-13)*(x-13) + (y-12)*(y-12);
      img[i] = (r2 < 10 ? 220 : 40) + $urandom_range(0, 30);
    end
    dogs(img, W, H, dg, g3ref);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < W*H; p++) begin
      @(negedge clk);
      in_valid = 1; in_sof = (p == 0); in_pix = pix_t'(img[p]);
      @(negedge clk);
      in_valid = 0; in_sof = 0;
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks += 2;
    if (nout != (W-14)*(H-14)) begin
      failures++; $display("FAIL output count %0d", nout);
    end
    if (nonzero == 0) begin
      failures++; $display("FAIL all DoG values were zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
