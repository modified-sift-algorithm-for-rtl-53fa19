// sift_top: two-octave SIFT keypoint detector for a streamed camera image.
//
// Octave 0: the input frame (IMG_W x IMG_H, raster order) goes through a DoG
// module (line buffer, six Gaussian filters, five DoG images) and a keypoint
// detection module. Octave 1: Gaussian image 3 of octave 0 is down-sampled
// by two in each direction and goes through an identical DoG module and
// keypoint detection module at the smaller width. Twelve Gaussian filters
// run in parallel, one new pixel per clock in octave 0 and one per four
// clocks in octave 1, so the throughput is one pixel per clock.
//
// Interface: pix_valid/pix_sof/pix carry the camera stream (pix_sof on pixel
// (0,0)). Each octave has a feature store read port: kp_avail[o] says a
// record is waiting, kp_rec[o] is it, kp_rd[o] pops it; kp_overflow[o] is
// sticky once a record was lost. kp_pulse[o] and kp_interior[o] expose, per
// clock, which scale units wrote a record and that a reportable pixel was
// tested. EDGE_R (principal-curvature ratio limit) and LC_TH (contrast
// threshold in grey levels) set the two rejection tests. Octave-1 coordinates are in octave-1 pixels: octave-0 position =
// 7 + 2*x, 7 + 2*y. The octave-1 frame is OCT1_W x OCT1_H (see
// down_sampler for the border rule).
module sift_top
  import sift_pkg::*;
#(
  parameter int IMG_W      = 1280,
  parameter int IMG_H      = 720,
  parameter int FIFO_DEPTH = 1024,
  parameter int EDGE_R     = 10,
  parameter int LC_TH      = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_valid,
  input  logic       pix_sof,
  input  pix_t       pix,
  input  logic [1:0] kp_rd,
  output logic [1:0] kp_avail,
  output kp_rec_t    kp_rec [2],
  output logic [1:0] kp_overflow,
  output logic [2:0] kp_pulse [2],
  output logic [1:0] kp_interior
);

  localparam int OCT1_W = (IMG_W - 13) / 2;
  localparam int OCT1_H = (IMG_H - 13) / 2;

  // ---------------- octave 0 ----------------
  logic   d0_valid;
  dog_t   d0 [NDOG];
  gpix_t  g3;
  coord_t d0_x, d0_y;

  dog_module #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_dog0 (
    .clk, .rst_n, .in_valid(pix_valid), .in_sof(pix_sof), .in_pix(pix),
    .dog_valid(d0_valid), .dog(d0), .g3, .out_x(d0_x), .out_y(d0_y)
  );

  keypoint_detect #(.IMG_W(IMG_W), .DEPTH(FIFO_DEPTH), .EDGE_R(EDGE_R), .LC_TH(LC_TH)) u_kp0 (
    .clk, .rst_n, .dog_valid(d0_valid), .dog(d0), .in_x(d0_x), .in_y(d0_y),
    .rd(kp_rd[0]), .avail(kp_avail[0]), .rd_rec(kp_rec[0]),
    .overflow(kp_overflow[0]), .kp_pulse(kp_pulse[0]), .interior(kp_interior[0])
  );

  // ---------------- down sampler ----------------
  logic ds_valid, ds_sof;
  pix_t ds_pix;

  down_sampler u_ds (
    .clk, .rst_n, .in_valid(d0_valid), .in_g(g3), .in_x(d0_x), .in_y(d0_y),
    .out_valid(ds_valid), .out_sof(ds_sof), .out_pix(ds_pix)
  );

  // ---------------- octave 1 ----------------
  logic   d1_valid;
  dog_t   d1 [NDOG];
  coord_t d1_x, d1_y;

  dog_module #(.IMG_W(OCT1_W), .IMG_H(OCT1_H)) u_dog1 (
    .clk, .rst_n, .in_valid(ds_valid), .in_sof(ds_sof), .in_pix(ds_pix),
    .dog_valid(d1_valid), .dog(d1), .g3(), .out_x(d1_x), .out_y(d1_y)
  );

  keypoint_detect #(.IMG_W(OCT1_W), .DEPTH(FIFO_DEPTH), .EDGE_R(EDGE_R), .LC_TH(LC_TH)) u_kp1 (
    .clk, .rst_n, .dog_valid(d1_valid), .dog(d1), .in_x(d1_x), .in_y(d1_y),
    .rd(kp_rd[1]), .avail(kp_avail[1]), .rd_rec(kp_rec[1]),
    .overflow(kp_overflow[1]), .kp_pulse(kp_pulse[1]), .interior(kp_interior[1])
  );

endmodule
