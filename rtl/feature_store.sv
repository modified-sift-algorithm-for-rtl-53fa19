// feature_store: the feature information store of one octave.
//
// A first-word-fall-through FIFO of keypoint records (x, y and the scale
// flags of the three detection units). wr pushes wr_rec; when the FIFO is
// full the record is dropped and the sticky overflow flag is set (cleared
// by reset). While avail is high, rd_rec is the oldest record and rd pops
// it at the clock edge. Depth, drop-on-full and the FIFO form are this
// design's choices; the text names the store without describing it.
module feature_store
  import sift_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr,
  input  kp_rec_t wr_rec,
  input  logic    rd,
  output logic    avail,
  output kp_rec_t rd_rec,
  output logic    overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = $clog2(DEPTH);

  kp_rec_t       mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          full, do_wr, do_rd;

  assign avail = (count != 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_rd = rd && avail;
  assign do_wr = wr && (!full || do_rd);
  assign rd_rec = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_rec;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
      if (wr && !do_wr) overflow <= 1'b1;
    end
  end

  // A pop is only meaningful when a record is there.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> avail)
    else $error("feature_store: read while empty");

endmodule
