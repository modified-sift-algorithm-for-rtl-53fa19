// tb_sift_full: one full 1280 x 720 frame through the detector at its
// default parameters, at one pixel per clock.
//
// The frame is a noisy gradient with a few hundred disks, Gaussian blobs
// and ridges of random size and sign. Both feature stores are drained as
// records appear; the records of both octaves must equal the software
// reference, no store may overflow, the frame must enter in exactly
// 1280*720 clocks, and every record must be out within 40 clocks of the
// last pixel (the pipeline drains without further input).
module tb_sift_full;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int W = 1280, H = 720;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, pix_valid = 0, pix_sof = 0;
  pix_t pix = '0;
  logic [1:0] kp_rd, kp_avail, kp_overflow, kp_interior;
  kp_rec_t kp_rec [2];
  logic [2:0] kp_pulse [2];

  sift_top dut (.*);

  always #5 clk = ~clk;

  int got [2][$];
  longint cyc = 0;

  always @(negedge clk) begin
    kp_rd = '0;
    cyc++;
    if (rst_n)
      for (int o = 0; o < 2; o++)
        if (kp_avail[o]) begin
          got[o].push_back((int'(kp_rec[o].x) << 20) | (int'(kp_rec[o].y) << 4) | int'(kp_rec[o].scale_hit));
          kp_rd[o] = 1'b1;
        end
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void add_shape(inout int img[], input int cx, input int cy,
                                    input int kind, input real sz, input real am);
    int r = int'(4.0 * sz) + 2;
    for (int y = cy - r; y <= cy + r; y++)
      for (int x = cx - r; x <= cx + r; x++)
        if (x >= 0 && x < W && y >= 0 && y < H) begin
          automatic real dx = real'(x - cx), dy = real'(y - cy);
          automatic int  v;
          if (kind == 0)      v = img[y*W+x] + (((dx*dx + dy*dy) <= sz*sz) ? int'(am) : 0);
          else if (kind == 1) v = img[y*W+x] + int'(am * $exp(-(dx*dx + dy*dy) / (2.0*sz*sz)));
          else                v = img[y*W+x] + int'(am * $exp(-(dx*dx/(0.5*sz*sz) + dy*dy/(8.0*sz*sz)) / 2.0));
          img[y*W+x] = v < 0 ? 0 : (v > 255 ? 255 : v);
        end
  endfunction

  initial begin
    automatic int img[], img1[], dg[5][], g3[], r0[$], r1[$];
    automatic int W1, H1, a, b, c;
    automatic longint t0, t1, t_last;
    img = new[W*H];
    foreach (img[i]) img[i] = 40 + (i % W) / 16 + (i / W) / 12 + $urandom_range(0, 3);
    for (int s = 0; s < 400; s++)
      add_shape(img, $urandom_range(0, W-1), $urandom_range(0, H-1), s % 3,
                1.5 + real'($urandom_range(0, 100)) / 12.0,
                real'($urandom_range(60, 200)) * ((s % 2) ? 1.0 : -1.0));
    dogs(img, W, H, dg, g3);
    detect(dg, W, H, 10, 1, r0, a, b, c);
    $display("reference octave 0: %0d extrema, %0d edge rejects, %0d low-contrast rejects, %0d keypoint records", a, b, c, r0.size());
    downsample(g3, W, H, img1, W1, H1);
    dogs(img1, W1, H1, dg, g3);
    detect(dg, W1, H1, 10, 1, r1, a, b, c);
    $display("reference octave 1 (%0d x %0d): %0d extrema, %0d records", W1, H1, a, r1.size());

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    t0 = cyc;
    for (int p = 0; p < W*H; p++) begin
      pix_valid = 1; pix_sof = (p == 0); pix = pix_t'(img[p]);
      @(negedge clk);
    end
    t1 = cyc;
    pix_valid = 0; pix_sof = 0;
    t_last = cyc;
    repeat (40) begin
      @(negedge clk);
      if (kp_avail != 0) t_last = cyc;
    end
    checks += 4;
    if (t1 - t0 != longint'(W*H)) begin
      failures++; $display("FAIL frame took %0d clocks", t1 - t0);
    end
    if (kp_avail != 0 || t_last - t1 > 30) begin
      failures++; $display("FAIL pipeline did not drain");
    end
    if (got[0].size() != r0.size() || got[1].size() != r1.size()) begin
      failures++; $display("FAIL record counts %0d/%0d vs %0d/%0d", got[0].size(), got[1].size(), r0.size(), r1.size());
    end
    if (kp_overflow != 0) begin
      failures++; $display("FAIL overflow");
    end
    for (int i = 0; i < r0.size() && i < got[0].size(); i++) begin
      checks++;
      if (got[0][i] != r0[i]) begin failures++; $display("FAIL oct0 record %0d", i); end
    end
    for (int i = 0; i < r1.size() && i < got[1].size(); i++) begin
      checks++;
      if (got[1][i] != r1[i]) begin failures++; $display("FAIL oct1 record %0d", i); end
    end
    $display("frame: %0d clocks for %0d pixels; %0d + %0d keypoint records", t1 - t0, W*H, got[0].size(), got[1].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
