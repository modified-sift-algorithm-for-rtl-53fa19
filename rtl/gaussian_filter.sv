// gaussian_filter: separable 15x15 Gaussian filter of one scale.
//
// Column filter first, then row filter, each folded on the kernel's symmetry:
// the pixels at offsets +d and -d are added before one multiplication by K_i
// (i = 7-d), so each pass needs 8 array multipliers for 15 taps. Every kernel
// sums to SUM = 1024, so dividing by SUM is a shift by 10:
//   column:  C(x) = sum_i K_i * (D_i + D_14-i) + K7*D7   (= 1024 * mean, read
//            as an 8.10 value with no bits dropped)
//   row:     G    = (sum_i K_i * (C(x-i) + C(x-14+i)) + K7*C(x-7)) >> 10
// G is the Gaussian pixel in unsigned 8.10 format, truncated.
//
// Timing: the arithmetic is pipelined (pre-add, multiply, sum) and advances
// every clock with a valid bit; the 15-deep row delay line advances only on a
// valid column. out_valid follows in_valid by 7 clocks. out_g is the Gaussian
// pixel centred 7 columns left of and 7 rows above the input pixel tagged by
// out_x/out_y. The kernel values (sigma = 1.6*2^(SCALE/3)), the pipeline
// cut and the truncation are this design's choices; the folding, SUM = 1024,
// the 8.10 format and the column-then-row order follow the architecture.
module gaussian_filter
  import sift_pkg::*;
#(
  parameter int SCALE = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pix_t   taps [TAPS],
  input  coord_t in_x,
  input  coord_t in_y,
  output logic   out_valid,
  output gpix_t  out_g,
  output coord_t out_x,
  output coord_t out_y
);

  localparam int NK   = HALF + 1;         // 8 multipliers per pass
  localparam int CP_W = PIX_W + 1;        // pre-added pixel pair
  localparam int RP_W = G_W + 1;          // pre-added column pair

  logic [K_W-1:0] k [NK];
  for (genvar i = 0; i < NK; i++) begin : g_k
    assign k[i] = gauss_k(SCALE, i);
  end

  // ---------------- column filter ----------------
  logic [CP_W-1:0]     c_pair [NK];
  logic [CP_W+K_W-1:0] c_prod [NK];
  logic [CP_W+K_W-1:0] c_prod_q [NK];
  gpix_t               col;
  logic                v1, v2, v3;
  coord_t              x1, y1, x2, y2, x3, y3;

  always_ff @(posedge clk) begin
    for (int i = 0; i < HALF; i++) begin
      c_pair[i] <= CP_W'(taps[i]) + CP_W'(taps[TAPS-1-i]);
    end
    c_pair[HALF] <= CP_W'(taps[HALF]);
  end

  for (genvar i = 0; i < NK; i++) begin : g_cmul
    array_mult #(.A_W(CP_W), .B_W(K_W)) u_mul (
      .a(c_pair[i]), .b(k[i]), .p(c_prod[i])
    );
  end

  always_ff @(posedge clk) begin
    c_prod_q <= c_prod;
  end

  always_ff @(posedge clk) begin
    logic [G_W+3:0] acc;
    acc = '0;
    for (int i = 0; i < NK; i++) acc += (G_W+4)'(c_prod_q[i]);
    col <= G_W'(acc);                 // at most 1024*255: fits 8.10
  end

  // ---------------- row filter ----------------
  gpix_t               r_line [TAPS];
  logic [RP_W-1:0]     r_pair [NK];
  logic [RP_W+K_W-1:0] r_prod [NK];
  logic [RP_W+K_W-1:0] r_prod_q [NK];
  logic                v4, v5, v6, v7;
  coord_t              x4, y4, x5, y5, x6, y6;

  always_ff @(posedge clk) begin
    if (v3) begin
      r_line[0] <= col;
      for (int i = 1; i < TAPS; i++) r_line[i] <= r_line[i-1];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < HALF; i++) begin
      r_pair[i] <= RP_W'(r_line[i]) + RP_W'(r_line[TAPS-1-i]);
    end
    r_pair[HALF] <= RP_W'(r_line[HALF]);
  end

  for (genvar i = 0; i < NK; i++) begin : g_rmul
    array_mult #(.A_W(RP_W), .B_W(K_W)) u_mul (
      .a(r_pair[i]), .b(k[i]), .p(r_prod[i])
    );
  end

  always_ff @(posedge clk) begin
    r_prod_q <= r_prod;
  end

  always_ff @(posedge clk) begin
    logic [RP_W+K_W+2:0] acc;
    acc = '0;
    for (int i = 0; i < NK; i++) acc += (RP_W+K_W+3)'(r_prod_q[i]);
    out_g <= G_W'(acc >> FRAC);       // at most 1024*(2^18-1) >> 10
  end

  // ---------------- valid and coordinate pipeline ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {v1, v2, v3, v4, v5, v6, v7} <= '0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      v4 <= v3;        // row line shifted on v3, pre-add on v4
      v5 <= v4;
      v6 <= v5;
      v7 <= v6;
    end
  end

  always_ff @(posedge clk) begin
    x1 <= in_x; y1 <= in_y;
    x2 <= x1;   y2 <= y1;
    x3 <= x2;   y3 <= y2;
    if (v3) begin
      x4 <= x3; y4 <= y3;
    end
    x5 <= x4;   y5 <= y4;
    x6 <= x5;   y6 <= y5;
    out_x <= x6; out_y <= y6;
  end

  assign out_valid = v7;

endmodule
