// dilation: 3 x 3 grey-scale dilation with a flat square structuring element.
//
// Pixels arrive in raster order, one per in_valid. A row_cel stores the
// last three image lines in three round-robin row banks and forms the 3 x 3
// window. For each of the three window rows a max3 picks the maximum of
// columns 1, 2 and 3; max4 then picks the maximum of the three row results,
// and that value is the output pixel. This structure is the one the design
// description gives for the dilation unit.
//
// Timing: out_valid/out_pix come two clocks after the in_valid pixel that
// completes a window (one clock in row_cel, one in the output register).
// Only complete windows produce an output (no border padding), so a frame
// of IMG_W x IMG_H pixels gives (IMG_W-2) x (IMG_H-2) results in raster
// order; out_last marks the last of them. No back-pressure: the unit takes
// a pixel every clock if offered.
module dilation #(
  parameter int unsigned PIX_W = morph_pkg::PIX_W,
  parameter int unsigned IMG_W = morph_pkg::IMG_W,
  parameter int unsigned IMG_H = morph_pkg::IMG_H
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix,
  output logic             out_last
);
  logic [2:0][2:0][PIX_W-1:0] win;
  logic                       win_valid, win_last;
  logic [PIX_W-1:0]           row_res [3];
  logic [PIX_W-1:0]           res;

  row_cel #(.PIX_W(PIX_W), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_row_cel (
    .clk, .rst_n, .in_valid, .in_pix,
    .win, .win_valid, .win_last,
    .row_sel()
  );

  for (genvar r = 0; r < 3; r++) begin : g_row
    max3 #(.PIX_W(PIX_W)) u_max3 (
      .c1(win[r][0]), .c2(win[r][1]), .c3(win[r][2]), .y(row_res[r])
    );
  end

  max4 #(.PIX_W(PIX_W)) u_max4 (
    .r1(row_res[0]), .r2(row_res[1]), .r3(row_res[2]), .y(res)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= win_valid;
      out_last  <= win_valid && win_last;
      if (win_valid) out_pix <= res;
    end
  end
endmodule
