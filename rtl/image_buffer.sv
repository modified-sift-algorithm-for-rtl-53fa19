// image_buffer: the shared line buffer of one octave.
//
// Turns a raster pixel stream into a column of TAPS vertically adjacent
// pixels. D0 is the newest pixel (the input through one Z^-1 register);
// each further tap D1..D14 is the previous tap delayed by one image line
// (Z^-W, W = IMG_W pixels), so after a valid pixel at (x, y) the taps hold
// D_k = pixel(x, y-k). All six Gaussian filters of the octave read the same
// taps, which is the sharing the architecture relies on.
//
// Interface: in_valid/in_sof/in_pix is the pixel stream (in_sof marks pixel
// (0,0); without it the coordinates wrap at IMG_W x IMG_H). The delay line
// moves only on valid pixels. out_valid pulses for one clock after each valid
// pixel; taps, out_x and out_y (coordinates of D0) then hold until the next.
// Each Z^-W is a circular RAM of IMG_W-1 words plus the tap register; the
// RAM organisation and the coordinate tags are this design's choice.
module image_buffer
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
  output logic   out_valid,
  output pix_t   taps [TAPS],
  output coord_t out_x,
  output coord_t out_y
);

  // D0: one-pixel delay.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps[0] <= '0;
    end else if (in_valid) begin
      taps[0] <= in_pix;
    end
  end

  // D1..D14: one image line each.
  for (genvar k = 1; k < TAPS; k++) begin : g_line
    line_delay #(.N(IMG_W - 1), .W(PIX_W)) u_line (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (in_valid),
      .din  (taps[k-1]),
      .dout (taps[k])
    );
  end

  // Raster coordinates of the pixel now in D0.
  coord_t nx, ny;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nx        <= '0;
      ny        <= '0;
      out_x     <= '0;
      out_y     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (in_sof) begin
          out_x <= '0;
          out_y <= '0;
          nx    <= coord_t'(1);
          ny    <= '0;
        end else begin
          out_x <= nx;
          out_y <= ny;
          if (nx == coord_t'(IMG_W - 1)) begin
            nx <= '0;
            ny <= (ny == coord_t'(IMG_H - 1)) ? '0 : ny + 1'b1;
          end else begin
            nx <= nx + 1'b1;
          end
        end
      end
    end
  end

endmodule
