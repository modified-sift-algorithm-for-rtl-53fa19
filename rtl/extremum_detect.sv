// extremum_detect: scale-space extremum test over 3x3x3 DoG pixels.
//
// The centre of the middle window, cur[4], is an extremum when it is strictly
// greater than all 26 neighbours (8 in its own scale, 9 in the scale below
// and 9 above) or strictly smaller than all of them. Windows are row-major,
// index 4 is the centre. Purely combinational. Treating ties as "not an
// extremum" is this design's choice.
module extremum_detect
  import sift_pkg::*;
(
  input  dog_t prev [9],
  input  dog_t cur  [9],
  input  dog_t next [9],
  output logic is_ext
);

  always_comb begin
    logic gt_all, lt_all;
    gt_all = 1'b1;
    lt_all = 1'b1;
    for (int i = 0; i < 9; i++) begin
      if (!(cur[4] > prev[i])) gt_all = 1'b0;
      if (!(cur[4] < prev[i])) lt_all = 1'b0;
      if (!(cur[4] > next[i])) gt_all = 1'b0;
      if (!(cur[4] < next[i])) lt_all = 1'b0;
      if (i != 4) begin
        if (!(cur[4] > cur[i])) gt_all = 1'b0;
        if (!(cur[4] < cur[i])) lt_all = 1'b0;
      end
    end
    is_ext = gt_all || lt_all;
  end

endmodule
