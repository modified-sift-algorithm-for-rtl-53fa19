// low_contrast: rejects keypoints with a weak DoG response.
//
// Flags the centre DoG value d as low contrast when |d| <= LC_TH. The value
// of the threshold is this design's choice (1 grey level, since the DoG bus
// carries whole grey levels); the text gives only the comparison.
// Purely combinational.
module low_contrast
  import sift_pkg::*;
#(
  parameter int LC_TH = 1
) (
  input  dog_t d,
  output logic is_low
);

  always_comb begin
    logic signed [DOG_W:0] mag;
    mag    = (d < 0) ? -(DOG_W+1)'(d) : (DOG_W+1)'(d);
    is_low = mag <= (DOG_W+1)'(LC_TH);
  end

endmodule
