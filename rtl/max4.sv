// max4: final stage of the dilation unit. Takes the three row maxima
// (rows 1, 2 and 3 of the window, each from a max3) and returns the largest,
// which is the maximum of the whole 3 x 3 neighbourhood. The name follows
// the stage naming of the dilation datapath. Purely combinational.
module max4 #(
  parameter int unsigned PIX_W = morph_pkg::PIX_W
) (
  input  logic [PIX_W-1:0] r1,
  input  logic [PIX_W-1:0] r2,
  input  logic [PIX_W-1:0] r3,
  output logic [PIX_W-1:0] y
);
  logic [PIX_W-1:0] m12;
  always_comb begin
    m12 = (r1 > r2) ? r1 : r2;
    y   = (m12 > r3) ? m12 : r3;
  end
endmodule
