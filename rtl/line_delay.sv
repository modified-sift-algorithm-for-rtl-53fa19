// line_delay: a Z^-N delay element that moves only on enable.
//
// Holds the last N enabled input words in a circular RAM: on each enabled
// cycle the word written N enables ago is read out and replaced by the new
// input (read before write at one address). dout is registered, so it is
// valid from the clock edge of the enable and holds until the next enable.
// Used as the one-line (Z^-W) delay of the image buffer and window generator.
// The RAM contents are not reset; the pointer is.
module line_delay #(
  parameter int N = 1280,
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int AW = (N > 1) ? $clog2(N) : 1;

  logic [W-1:0]  mem [N];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (ptr == AW'(N - 1)) ? '0 : ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end

endmodule
