// tb_keypoint_detect: streams five synthetic DoG images (48 x 40 frame) into one
// octave's keypoint detection module: low random noise plus planted blobs
// (true keypoints), ridges (edge rejects) and weak peaks (contrast rejects).
// The records read from the feature store must equal the reference detector's
// list, in raster order; each kind of decision must have occurred.
module tb_keypoint_detect;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int W = 48, H = 40;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, dog_valid = 0, rd = 0;
  dog_t dog [NDOG];
  coord_t in_x = '0, in_y = '0;
  logic avail, overflow, interior;
  kp_rec_t rd_rec;
  logic [2:0] kp_pulse;
  int dg[5][];
  int recs[$];
  int got[$];
  int n_ext, n_edge, n_low;

  keypoint_detect #(.IMG_W(W), .DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  // drain the store continuously
  always @(negedge clk) begin
    rd = 0;
    if (rst_n && avail) begin
      got.push_back((int'(rd_rec.x) << 20) | (int'(rd_rec.y) << 4) | int'(rd_rec.scale_hit));
      rd = 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      dg[i] = new[W*H];
      foreach (dg[i][p]) dg[i][p] = $urandom_range(0, 4) - 2;
    end
    // blobs in scale 2 (strong, isotropic)
    for (int b = 0; b < 24; b++) begin
      automatic int cx = $urandom_range(9, W-10), cy = $urandom_range(9, H-10);
      automatic int sc = $urandom_range(1, 3);
      dg[sc][cy*W + cx] = (b % 2) ? 60 : -60;
    end
    // a ridge along a column of scale 2, peak in the middle
    for (int y = 9; y < 16; y++) dg[2][y*W + 20] = 30;
    dg[2][12*W + 20] = 31;
    // weak peak (|d| = 1 everywhere around it is below it): low contrast
    for (int k = 0; k < 27; k++) dg[1 + k/9][(15 + (k%9)/3 - 1)*W + 10 + k%3 - 1] = -2;
    dg[2][15*W + 10] = 1;

    detect(dg, W, H, 10, 1, recs, n_ext, n_edge, n_low);
    $display("reference: %0d records, %0d extrema, %0d edge, %0d low", recs.size(), n_ext, n_edge, n_low);

    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < W*H; p++) begin
      @(negedge clk);
      // as in the full design, the tag is the input pixel and the DoG
      // value belongs to the centre 7 columns left and 7 rows up
      dog_valid = 1; in_x = coord_t'(p % W); in_y = coord_t'(p / W);
      for (int i = 0; i < NDOG; i++)
        dog[i] = (p % W >= 7 && p / W >= 7) ? dog_t'(dg[i][p - 7*W - 7]) : dog_t'($urandom_range(0, 4) - 2);
      @(negedge clk);
      dog_valid = 0;
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (got.size() != recs.size()) begin
      failures++; $display("FAIL %0d records vs %0d", got.size(), recs.size());
    end
    for (int i = 0; i < recs.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != recs[i]) begin
        failures++; $display("FAIL record %0d: %h vs %h", i, got[i], recs[i]);
      end
    end
    checks += 2;
    if (recs.size() == 0 || n_edge == 0 || n_low == 0) begin
      failures++; $display("FAIL coverage");
    end
    if (overflow) begin
      failures++; $display("FAIL overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
