// keypoint_detect: stable keypoint detection of one octave.
//
// Five window generators cut 3x3 windows from the five DoG images. Three
// detection units look at three consecutive scales each (DoG 0-1-2, 1-2-3,
// 2-3-4); unit u flags a keypoint at the centre of its middle window when
//   extremum AND NOT edge-response AND NOT low-contrast,
// the edge and contrast tests being made on the middle scale. Pixels with a
// keypoint in any unit are written to the feature information store as one
// record {x, y, scale_hit[2:0]}, scale_hit[u] marking DoG image u+1.
//
// Only centres whose every 3x3 neighbour has a full 15x15 Gaussian window in
// the frame are reported: window tags x, y >= 16, centre (x-8, y-8), so
// centres run from 8 to IMG_W-9 / IMG_H-9. Timing: windows one clock after
// dog_valid, the flags registered one clock later, the record written the
// clock after that. The border rule and the record layout are this design's
// choices; the unit structure follows the architecture.
module keypoint_detect
  import sift_pkg::*;
#(
  parameter int IMG_W  = 1280,
  parameter int DEPTH  = 1024,
  parameter int EDGE_R = 10,
  parameter int LC_TH  = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    dog_valid,
  input  dog_t    dog [NDOG],
  input  coord_t  in_x,
  input  coord_t  in_y,
  input  logic    rd,
  output logic    avail,
  output kp_rec_t rd_rec,
  output logic    overflow,
  output logic [2:0] kp_pulse,   // flags written this clock (for counting)
  output logic    interior       // a reportable centre was tested this clock
);

  localparam int BORDER = 2 * HALF + 2;   // 16

  logic   w_valid [NDOG];
  dog_t   win     [NDOG][9];
  coord_t w_x     [NDOG];
  coord_t w_y     [NDOG];

  for (genvar i = 0; i < NDOG; i++) begin : g_win
    window_generator #(.IMG_W(IMG_W)) u_wg (
      .clk, .rst_n, .in_valid(dog_valid), .in_d(dog[i]), .in_x, .in_y,
      .out_valid(w_valid[i]), .win(win[i]), .out_x(w_x[i]), .out_y(w_y[i])
    );
  end

  logic [2:0] is_ext, is_edge, is_low, hit;

  for (genvar u = 0; u < 3; u++) begin : g_unit
    extremum_detect u_ext (
      .prev(win[u]), .cur(win[u+1]), .next(win[u+2]), .is_ext(is_ext[u])
    );
    edge_response #(.EDGE_R(EDGE_R)) u_edge (
      .win(win[u+1]), .is_edge(is_edge[u])
    );
    low_contrast #(.LC_TH(LC_TH)) u_low (
      .d(win[u+1][4]), .is_low(is_low[u])
    );
    assign hit[u] = is_ext[u] && !is_edge[u] && !is_low[u];
  end

  logic    in_frame;
  logic    f_valid;
  kp_rec_t f_rec;

  assign in_frame = w_valid[0] && (w_x[0] >= coord_t'(BORDER)) && (w_y[0] >= coord_t'(BORDER));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_valid  <= 1'b0;
      f_rec    <= '0;
      interior <= 1'b0;
    end else begin
      interior        <= in_frame;
      f_valid         <= in_frame && (hit != '0);
      f_rec.x         <= w_x[0] - coord_t'(BORDER / 2);
      f_rec.y         <= w_y[0] - coord_t'(BORDER / 2);
      f_rec.scale_hit <= in_frame ? hit : '0;
    end
  end

  assign kp_pulse = f_valid ? f_rec.scale_hit : '0;

  feature_store #(.DEPTH(DEPTH)) u_store (
    .clk, .rst_n, .wr(f_valid), .wr_rec(f_rec), .rd, .avail, .rd_rec,
    .overflow, .count()
  );

endmodule
