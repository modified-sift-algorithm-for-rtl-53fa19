// window_generator: 3x3 window of one DoG image.
//
// Two one-line delays (Z^-W) give the pixel above and two above the newest;
// each of the three rows then runs through a 3-deep shift register. After a
// valid input tagged (x, y), win[r*3+c] = DoG(x-2+c, y-2+r): row-major with
// win[4] the centre (x-1, y-1). Everything moves only on in_valid; out_valid
// pulses one clock after it and the window holds until the next input.
// The line-delay construction mirrors the image buffer and is this design's
// choice; the 3x3 window itself is the architecture's.
module window_generator
  import sift_pkg::*;
#(
  parameter int IMG_W = 1280
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  dog_t   in_d,
  input  coord_t in_x,
  input  coord_t in_y,
  output logic   out_valid,
  output dog_t   win [9],
  output coord_t out_x,
  output coord_t out_y
);

  dog_t colv [3];   // colv[r]: pixel r rows above the newest
  dog_t h1 [3];     // one column older
  dog_t h2 [3];     // two columns older

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      colv[0] <= '0;
    end else if (in_valid) begin
      colv[0] <= in_d;
    end
  end

  for (genvar r = 1; r < 3; r++) begin : g_line
    line_delay #(.N(IMG_W - 1), .W(DOG_W)) u_line (
      .clk, .rst_n, .en(in_valid), .din(colv[r-1]), .dout(colv[r])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h1 <= '{default: '0};
      h2 <= '{default: '0};
    end else if (in_valid) begin
      h1 <= colv;
      h2 <= h1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_x <= in_x;
        out_y <= in_y;
      end
    end
  end

  // Row r of the window (top = 0) is colv index 2-r.
  for (genvar r = 0; r < 3; r++) begin : g_win
    assign win[r*3 + 0] = h2[2-r];
    assign win[r*3 + 1] = h1[2-r];
    assign win[r*3 + 2] = colv[2-r];
  end

endmodule
