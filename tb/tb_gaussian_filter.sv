// tb_gaussian_filter: image buffer plus one Gaussian filter per scale
// (0, 3 and 5) on a random 24 x 22 frame with random input gaps. Every output
// whose 15x15 window lies in the frame is compared with the reference
// 2-D convolution, and the latency (7 clocks from the buffer's out_valid)
// is checked for every output.
module tb_gaussian_filter;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int W = 24, H = 22;
  localparam int NS = 3;
  localparam int SC [NS] = '{0, 3, 5};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  pix_t in_pix = '0;
  logic ib_valid;
  pix_t taps [TAPS];
  coord_t ib_x, ib_y;
  logic   o_valid [NS];
  gpix_t  o_g     [NS];
  coord_t o_x     [NS];
  coord_t o_y     [NS];
  int img[];
  int gref [NS][];
  int nout = 0;

  image_buffer #(.IMG_W(W), .IMG_H(H)) u_ib (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid(ib_valid), .taps, .out_x(ib_x), .out_y(ib_y));

  for (genvar s = 0; s < NS; s++) begin : g_dut
    gaussian_filter #(.SCALE(SC[s])) dut (
      .clk, .rst_n, .in_valid(ib_valid), .taps, .in_x(ib_x), .in_y(ib_y),
      .out_valid(o_valid[s]), .out_g(o_g[s]), .out_x(o_x[s]), .out_y(o_y[s]));
  end

  always #5 clk = ~clk;

  // latency: a valid output exactly 7 clocks after each buffer output
  logic [6:0] vhist = '0;
  always @(negedge clk) begin
    vhist <= {vhist[5:0], ib_valid};
    if (rst_n) begin
      checks++;
      if (o_valid[0] != vhist[6]) begin
        failures++; $display("FAIL latency");
      end
    end
  end

  always @(negedge clk) begin
    for (int s = 0; s < NS; s++)
      if (rst_n && o_valid[s] && o_x[s] >= 14 && o_y[s] >= 14) begin
        automatic int cx = int'(o_x[s]) - 7, cy = int'(o_y[s]) - 7;
        checks++;
        if (s == 0) nout++;
        if (int'(o_g[s]) != gref[s][cy*W + cx]) begin
          failures++;
          $display("FAIL scale %0d at (%0d,%0d): %0d vs %0d", SC[s], cx, cy, o_g[s], gref[s][cy*W+cx]);
        end
      end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img = new[W*H];
    // random texture plus a bright square, so that smoothing matters
    foreach (img[i]) img[i] = ((i % W) > 8 && (i % W) < 15 && (i / W) > 6 && (i / W) < 13) ? 200 + $urandom_range(0, 55) : $urandom_range(0, 90);
    for (int s = 0; s < NS; s++) gauss(img, W, H, SC[s], gref[s]);
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
    checks++;
    if (nout != (W-14)*(H-14)) begin
      failures++; $display("FAIL output count %0d", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
