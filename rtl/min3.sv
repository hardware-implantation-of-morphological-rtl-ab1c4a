// min3: row minimum. Returns the smallest of the three pixels of one window
// row (columns 1, 2 and 3). Three copies of it, one per stored row, feed
// min4 in the erosion unit. Purely combinational; unsigned compare.
module min3 #(
  parameter int unsigned PIX_W = morph_pkg::PIX_W
) (
  input  logic [PIX_W-1:0] c1,
  input  logic [PIX_W-1:0] c2,
  input  logic [PIX_W-1:0] c3,
  output logic [PIX_W-1:0] y
);
  logic [PIX_W-1:0] m12;
  always_comb begin
    m12 = (c1 < c2) ? c1 : c2;
    y   = (m12 < c3) ? m12 : c3;
  end
endmodule
