// tb_sift_top: end-to-end test of the two-octave detector on 128 x 128 frames.
//
// Two frames of blobs of several sizes on a noisy gradient are streamed in,
// the first with random gaps, the second at one pixel per clock. Both
// feature stores are drained as records appear, and every record of both
// octaves must equal the software reference (Gaussians, DoG, extremum,
// edge and contrast tests, down-sampling, octave 1). A second instance with
// 2-deep stores that are never read, and a contrast threshold of 12 grey
// levels, must raise its overflow flags and hold the first record its own
// reference predicts. Mechanisms counted (each must occur): keypoints
// from each of the three scale units (in either octave), keypoints in
// octave 1, extrema rejected as edges, extrema rejected for low contrast, down-sampled pixels entering
// octave 1, store overflow, back-to-back frames at full rate.
module tb_sift_top;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int W = 128, H = 128;
  localparam int SMALL_TH = 12;      // contrast threshold of the second instance
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, pix_valid = 0, pix_sof = 0;
  pix_t pix = '0;
  logic [1:0] kp_rd, kp_avail, kp_overflow, kp_interior;
  kp_rec_t kp_rec [2];
  logic [2:0] kp_pulse [2];
  logic [1:0] s_avail, s_overflow, s_interior;
  kp_rec_t s_rec [2];
  logic [2:0] s_pulse [2];

  sift_top #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix, .kp_rd, .kp_avail, .kp_rec,
    .kp_overflow, .kp_pulse, .kp_interior);

  sift_top #(.IMG_W(W), .IMG_H(H), .FIFO_DEPTH(2), .LC_TH(SMALL_TH)) dut_small (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix, .kp_rd(2'b00), .kp_avail(s_avail),
    .kp_rec(s_rec), .kp_overflow(s_overflow), .kp_pulse(s_pulse), .kp_interior(s_interior));

  always #5 clk = ~clk;

  int got [2][$];
  int unit_hits [2][3];
  int edge_rej [2], low_rej [2], ds_pix, full_rate_px;

  function automatic int pack(kp_rec_t r);
    return (int'(r.x) << 20) | (int'(r.y) << 4) | int'(r.scale_hit);
  endfunction

  always @(negedge clk) begin
    kp_rd = '0;
    if (rst_n) begin
      for (int o = 0; o < 2; o++) begin
        if (kp_avail[o]) begin
          got[o].push_back(pack(kp_rec[o]));
          kp_rd[o] = 1'b1;
        end
        for (int u = 0; u < 3; u++) if (kp_pulse[o][u]) unit_hits[o][u]++;
      end
      if (dut.u_kp0.in_frame)
        for (int u = 0; u < 3; u++) begin
          if (dut.u_kp0.is_ext[u] && dut.u_kp0.is_edge[u]) edge_rej[0]++;
          if (dut.u_kp0.is_ext[u] && dut.u_kp0.is_low[u])  low_rej[0]++;
        end
      if (dut.u_kp1.in_frame)
        for (int u = 0; u < 3; u++) begin
          if (dut.u_kp1.is_ext[u] && dut.u_kp1.is_edge[u]) edge_rej[1]++;
          if (dut.u_kp1.is_ext[u] && dut.u_kp1.is_low[u])  low_rej[1]++;
        end
      for (int u = 0; u < 3; u++) begin
        if (dut_small.u_kp0.in_frame && dut_small.u_kp0.is_ext[u] && dut_small.u_kp0.is_low[u]) low_rej[0]++;
        if (dut_small.u_kp1.in_frame && dut_small.u_kp1.is_ext[u] && dut_small.u_kp1.is_low[u]) low_rej[1]++;
      end
      if (dut.ds_valid) ds_pix++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void add_blob(inout int img[], input real cx, input real cy,
                                   input real sx, input real sy, input real am);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic real dx = (real'(x) - cx) / sx, dy = (real'(y) - cy) / sy;
        automatic int v = img[y*W+x] + int'(am * $exp(-(dx*dx + dy*dy) / 2.0));
        img[y*W+x] = v < 0 ? 0 : (v > 255 ? 255 : v);
      end
  endfunction

  function automatic void add_disk(inout int img[], input real cx, input real cy,
                                   input real r, input int am);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if ((real'(x) - cx)**2 + (real'(y) - cy)**2 <= r*r) begin
          automatic int v = img[y*W+x] + am;
          img[y*W+x] = v < 0 ? 0 : (v > 255 ? 255 : v);
        end
  endfunction

  function automatic void make_image(input int seed, output int img[]);
    img = new[W*H];
    foreach (img[i]) img[i] = 60 + (i % W) / 2 + (i / W) / 3 + $urandom_range(0, 3);
    // a random mix of disks, Gaussian blobs and elongated ridges
    for (int b = 0; b < 70; b++) begin
      automatic int  kind = b % 4;
      automatic real cx = real'($urandom_range(4, W-5)), cy = real'($urandom_range(4, H-5));
      automatic real am = real'($urandom_range(60, 200)) * (($urandom_range(0, 1) == 1) ? 1.0 : -1.0);
      automatic real sg = 1.0 + real'($urandom_range(0, 90)) / 10.0;
      if (kind == 0) add_disk(img, cx, cy, 1.0 + real'($urandom_range(0, 70)) / 10.0, int'(am));
      if (kind == 1 || kind == 2) add_blob(img, cx, cy, sg, sg, am);
      if (kind == 3) add_blob(img, cx, cy, 1.0 + sg / 4.0, 3.0 * sg, am);
    end
    // a clean patch with a disk (radius 6) and an ellipse (3.5 x 5): these
    // peak in the upper two DoG scales
    for (int y = 4; y < 44; y++)
      for (int x = 4; x < 80; x++) begin
        automatic bit in_disk = ((x-24)*(x-24) + (y-24)*(y-24)) <= 36;
        automatic bit in_ell  = ((real'(x-56)/3.5)**2 + (real'(y-24)/5.0)**2) <= 1.0;
        img[y*W+x] = (in_disk || in_ell) ? 230 : 30;
      end
    // a thin diagonal bar on a dark patch: an extremum rejected as an edge
    for (int y = 4; y < 40; y++)
      for (int x = 84; x < 124; x++) begin
        automatic real u = real'(x - 104 + y - 22) / 1.4142, v = real'(x - 104 - y + 22) / 1.4142;
        img[y*W+x] = ((u/12.0)**2 + (v/1.5)**2 <= 1.0) ? 255 : 0;
      end
    // a flat patch with faint dots: weak, low-contrast extrema
    for (int y = 90; y < 120; y++)
      for (int x = 4; x < 44; x++) img[y*W+x] = 128;
    for (int d = 0; d < 6; d++) img[(96 + 3*d)*W + 10 + 5*d] = 128 + 6 + 2*d;
  endfunction

  task automatic reference(input int img[], inout int exp0[$], inout int exp1[$],
                           inout int sm0[$], inout int sm1[$]);
    int dg[5][], g3[], img1[], W1, H1, r0[$], r1[$], a, b, c;
    dogs(img, W, H, dg, g3);
    detect(dg, W, H, 10, SMALL_TH, r0, a, b, c);
    sm0 = {sm0, r0};
    detect(dg, W, H, 10, 1, r0, a, b, c);
    $display("reference octave 0: %0d extrema, %0d edge, %0d low, %0d records", a, b, c, r0.size());
    downsample(g3, W, H, img1, W1, H1);
    dogs(img1, W1, H1, dg, g3);
    detect(dg, W1, H1, 10, SMALL_TH, r1, a, b, c);
    sm1 = {sm1, r1};
    detect(dg, W1, H1, 10, 1, r1, a, b, c);
    exp0 = {exp0, r0};
    exp1 = {exp1, r1};
  endtask

  initial begin
    automatic int img[];
    automatic int exp0[$], exp1[$], sm0[$], sm1[$];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++) begin
      make_image(f, img);
      reference(img, exp0, exp1, sm0, sm1);
      for (int p = 0; p < W*H; p++) begin
        @(negedge clk);
        pix_valid = 1; pix_sof = (p == 0); pix = pix_t'(img[p]);
        if (f == 1) full_rate_px++;
        else begin
          @(negedge clk);
          pix_valid = 0; pix_sof = 0;
          repeat ($urandom_range(0, 1)) @(negedge clk);
        end
      end
      @(negedge clk);
      pix_valid = 0; pix_sof = 0;
      repeat (30) @(negedge clk);
    end
    $display("expected %0d + %0d records, got %0d + %0d", exp0.size(), exp1.size(), got[0].size(), got[1].size());
    checks += 2;
    if (got[0].size() != exp0.size()) begin
      failures++; $display("FAIL octave 0 record count");
    end
    if (got[1].size() != exp1.size()) begin
      failures++; $display("FAIL octave 1 record count");
    end
    for (int i = 0; i < exp0.size() && i < got[0].size(); i++) begin
      checks++;
      if (got[0][i] != exp0[i]) begin
        failures++; $display("FAIL oct0 record %0d: %h vs %h", i, got[0][i], exp0[i]);
      end
    end
    for (int i = 0; i < exp1.size() && i < got[1].size(); i++) begin
      checks++;
      if (got[1][i] != exp1[i]) begin
        failures++; $display("FAIL oct1 record %0d: %h vs %h", i, got[1][i], exp1[i]);
      end
    end
    // overflow instance: flags set, oldest two records kept
    for (int o = 0; o < 2; o++) begin
      automatic int ex = (o == 0) ? sm0.size() : sm1.size();
      checks++;
      if (s_overflow[o] != (ex > 2)) begin
        failures++; $display("FAIL overflow flag octave %0d", o);
      end
      if (ex > 0) begin
        checks++;
        if (pack(s_rec[o]) != ((o == 0) ? sm0[0] : sm1[0])) begin
          failures++; $display("FAIL small store head octave %0d", o);
        end
      end
    end
    checks++;
    if (kp_overflow != 2'b00) begin
      failures++; $display("FAIL unexpected overflow");
    end
    // mechanism coverage
    $display("unit hits oct0 %0d %0d %0d oct1 %0d %0d %0d; edge rej %0d/%0d; low rej %0d/%0d; ds pixels %0d; overflow %b; full-rate pixels %0d",
             unit_hits[0][0], unit_hits[0][1], unit_hits[0][2], unit_hits[1][0], unit_hits[1][1], unit_hits[1][2],
             edge_rej[0], edge_rej[1], low_rej[0], low_rej[1], ds_pix, s_overflow, full_rate_px);
    for (int u = 0; u < 3; u++) begin
      checks++;
      if (unit_hits[0][u] + unit_hits[1][u] == 0) begin
        failures++; $display("FAIL no keypoint from scale unit %0d", u);
      end
    end
    checks++;
    if (unit_hits[1][0] + unit_hits[1][1] + unit_hits[1][2] == 0) begin
      failures++; $display("FAIL no keypoint in octave 1");
    end
    checks += 5;
    if (edge_rej[0] + edge_rej[1] == 0) begin failures++; $display("FAIL no edge rejection"); end
    if (low_rej[0] + low_rej[1] == 0)   begin failures++; $display("FAIL no contrast rejection"); end
    if (ds_pix != 2 * ((W-13)/2) * ((H-13)/2)) begin failures++; $display("FAIL down-sampled pixel count %0d", ds_pix); end
    if (s_overflow == 2'b00)            begin failures++; $display("FAIL no overflow"); end
    if (full_rate_px != W*H)            begin failures++; $display("FAIL full-rate frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
