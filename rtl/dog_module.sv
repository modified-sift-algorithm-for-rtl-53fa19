// dog_module: Difference-of-Gaussian pyramid of one octave.
//
// One image buffer feeds six Gaussian filters (scales sigma_j = 1.6*2^(j/3),
// j = 0..5) in parallel; five subtractors form the DoG images
//   DoG_i = G_{i+1} - G_i,   i = 0..4,
// i.e. D(sigma) = G(k sigma) - G(sigma). The 8.10 difference is floored to a
// whole grey level (arithmetic shift right by 10), which always fits the
// 9-bit signed DoG bus. Gaussian image 3 (sigma = 2*sigma0) is also brought
// out for the down sampler that builds the next octave.
//
// Timing: the filters all have the same latency, so the DoG images are
// aligned. dog_valid follows in_valid by 9 clocks (1 image buffer, 7 filter,
// 1 subtractor); dog[i] is then centred 7 columns left of and 7 rows above
// the input pixel tagged by out_x/out_y. g3 comes with the same valid and tag.
// The flooring to 9 bits is this design's choice.
module dog_module
  import sift_pkg::*;
#(
  parameter int IMG_W = 1280,
  parameter int IMG_H = 720
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_sof,
  input  pix_t   in_pix,
  output logic   dog_valid,
  output dog_t   dog [NDOG],
  output gpix_t  g3,
  output coord_t out_x,
  output coord_t out_y
);

  logic   ib_valid;
  pix_t   taps [TAPS];
  coord_t ib_x, ib_y;

  image_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ib (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid(ib_valid), .taps, .out_x(ib_x), .out_y(ib_y)
  );

  logic   g_valid [NSCALES];
  gpix_t  g       [NSCALES];
  coord_t g_x     [NSCALES];
  coord_t g_y     [NSCALES];

  for (genvar j = 0; j < NSCALES; j++) begin : g_filt
    gaussian_filter #(.SCALE(j)) u_gf (
      .clk, .rst_n, .in_valid(ib_valid), .taps, .in_x(ib_x), .in_y(ib_y),
      .out_valid(g_valid[j]), .out_g(g[j]), .out_x(g_x[j]), .out_y(g_y[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dog_valid <= 1'b0;
    end else begin
      dog_valid <= g_valid[0];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NDOG; i++) begin
      logic signed [G_W:0] diff;
      diff   = signed'({1'b0, g[i+1]}) - signed'({1'b0, g[i]});
      dog[i] <= DOG_W'(diff >>> FRAC);
    end
    g3    <= g[3];
    out_x <= g_x[0];
    out_y <= g_y[0];
  end

endmodule
