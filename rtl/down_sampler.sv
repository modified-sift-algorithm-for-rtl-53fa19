// down_sampler: builds the octave-1 source image from Gaussian image 3.
//
// Keeps every second pixel of every second row of octave 0's Gaussian image
// 3 (sigma = 2*sigma0), halving the resolution. Only Gaussian pixels whose
// whole 15x15 window lies inside the frame are used: centres x = 7, 9, ...,
// y = 7, 9, ... up to IMG_W-8 / IMG_H-8. The output image is therefore
// OUT_W x OUT_H = (IMG_W-13)/2 x (IMG_H-13)/2 (633 x 353 for 1280 x 720); the frame size
// itself is not needed here, since the tags carry the position.
// The 8.10 value is truncated to its 8-bit integer part (the fraction bits of
// in_g are deliberately unused). Both the border rule
// and the truncation are this design's choice.
//
// Interface: in_x/in_y is the tag of the input pixel that produced in_g (the
// Gaussian centre is 7 left and 7 up). One output pixel per kept input, one
// clock later; out_sof marks the first kept pixel of a frame.
module down_sampler
  import sift_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  gpix_t  in_g,
  input  coord_t in_x,
  input  coord_t in_y,
  output logic   out_valid,
  output logic   out_sof,
  output pix_t   out_pix
);

  localparam int OFS = 2 * HALF;        // tag of the first whole window

  logic keep;
  always_comb begin
    keep = in_valid
         && (in_x >= coord_t'(OFS)) && (in_y >= coord_t'(OFS))
         && !in_x[0] && !in_y[0];       // OFS is even: (x-OFS) even
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= keep;
      out_sof   <= keep && (in_x == coord_t'(OFS)) && (in_y == coord_t'(OFS));
      if (keep) out_pix <= in_g[G_W-1:FRAC];
    end
  end

endmodule
