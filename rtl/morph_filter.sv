// morph_filter: the morphological filtering co-processor.
//
// Holds one dilation unit and one erosion unit, both fed with the same
// raster-order pixel stream, and forwards the result of the selected
// operation (op: OP_DILATE = 3 x 3 maximum, OP_ERODE = 3 x 3 minimum).
// Offering both operations in one co-processor follows the design
// description; how the operation is chosen is this design's own choice:
// op is sampled with the first pixel of each frame and held until the
// frame's last pixel, so a frame is never filtered with mixed operations.
// The sampled operation travels down a two-stage pipeline alongside the
// pixels so the output select matches the unit latency.
//
// Timing: out_valid/out_pix follow the completing input pixel by two clocks
// (the latency of the units); out_last marks the last result of a frame.
// A frame of IMG_W x IMG_H pixels yields (IMG_W-2) x (IMG_H-2) results.
// op_active shows the operation of the frame in progress.
module morph_filter #(
  parameter int unsigned PIX_W = morph_pkg::PIX_W,
  parameter int unsigned IMG_W = morph_pkg::IMG_W,
  parameter int unsigned IMG_H = morph_pkg::IMG_H
) (
  input  logic             clk,
  input  logic             rst_n,
  input  morph_pkg::morph_op_t op,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix,
  output logic             out_last,
  output morph_pkg::morph_op_t op_active
);
  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned PW   = $clog2(NPIX);

  logic [PW-1:0]    pix_cnt;
  morph_pkg::morph_op_t op_q, op_cur, op_p1, op_p2;
  logic             d_valid, d_last, e_valid, e_last;
  logic [PIX_W-1:0] d_pix, e_pix;

  // Operation of the pixel being accepted this clock.
  assign op_cur    = (pix_cnt == '0) ? op : op_q;
  assign op_active = op_cur;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pix_cnt <= '0;
      op_q    <= morph_pkg::OP_DILATE;
      op_p1   <= morph_pkg::OP_DILATE;
      op_p2   <= morph_pkg::OP_DILATE;
    end else begin
      op_p1 <= op_cur;
      op_p2 <= op_p1;
      if (in_valid) begin
        op_q    <= op_cur;
        pix_cnt <= (pix_cnt == PW'(NPIX - 1)) ? '0 : pix_cnt + PW'(1);
      end
    end
  end

  dilation #(.PIX_W(PIX_W), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_dilation (
    .clk, .rst_n, .in_valid, .in_pix,
    .out_valid(d_valid), .out_pix(d_pix), .out_last(d_last)
  );

  erosion #(.PIX_W(PIX_W), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_erosion (
    .clk, .rst_n, .in_valid, .in_pix,
    .out_valid(e_valid), .out_pix(e_pix), .out_last(e_last)
  );

  always_comb begin
    if (op_p2 == morph_pkg::OP_ERODE) begin
      out_valid = e_valid;
      out_pix   = e_pix;
      out_last  = e_last;
    end else begin
      out_valid = d_valid;
      out_pix   = d_pix;
      out_last  = d_last;
    end
  end
endmodule
