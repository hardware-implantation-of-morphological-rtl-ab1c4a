// row_cel: row store and window former shared in structure by the dilation
// and erosion units.
//
// Three row banks, each as wide as the image (IMG_W pixels), hold the most
// recent image lines. Incoming pixels are written into the selected bank at
// the current column; when a line is complete the next bank is selected, in
// the order bank 1 -> bank 2 -> bank 3 -> bank 1, until the frame ends. This
// round-robin row selection is what the design description specifies.
//
// Window forming (this design's own arrangement): while a pixel of line r is
// written, the two other banks are read at the same column, giving the
// vertical triple (line r-2, line r-1, line r). The triple is shifted into a
// 3 x 3 register window, so after the pixel at (r, c) the window holds lines
// r-2..r and columns c-2..c. Only complete windows are flagged valid
// (r >= 2 and c >= 2): no border padding, so a frame yields
// (IMG_H-2) x (IMG_W-2) windows.
//
// Interface: in_valid/in_pix is a one-pixel-per-cycle stream in raster
// order with no back-pressure. win/win_valid appear one clock after the
// pixel that completes the window. win[i][j] is line i (0 = oldest) and
// column j (0 = leftmost). win_last marks the last window of a frame; the
// counters and bank select then return to the first line and bank 1.
// Reset (active-low, synchronous) clears counters and window flags; the
// banks need no reset because a window is only flagged after all three of
// its lines have been written in the current frame.
module row_cel #(
  parameter int unsigned PIX_W = morph_pkg::PIX_W,
  parameter int unsigned IMG_W = morph_pkg::IMG_W,
  parameter int unsigned IMG_H = morph_pkg::IMG_H
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [PIX_W-1:0]              in_pix,
  output logic [2:0][2:0][PIX_W-1:0]    win,
  output logic                          win_valid,
  output logic                          win_last,
  output logic [1:0]                    row_sel     // bank being written (0..2)
);
  localparam int unsigned CW = (IMG_W > 1) ? $clog2(IMG_W) : 1;
  localparam int unsigned RW = (IMG_H > 1) ? $clog2(IMG_H) : 1;

  logic [PIX_W-1:0] bank [3][IMG_W];
  logic [CW-1:0]    col;
  logic [RW-1:0]    row;
  logic [1:0]       sel;
  logic [1:0]       sel_m1, sel_m2;   // banks of lines r-1 and r-2
  logic [PIX_W-1:0] up1, up2;
  logic             end_of_line, end_of_frame;

  always_comb begin
    sel_m1       = (sel == 2'd0) ? 2'd2 : sel - 2'd1;
    sel_m2       = (sel_m1 == 2'd0) ? 2'd2 : sel_m1 - 2'd1;
    up1          = bank[sel_m1][col];
    up2          = bank[sel_m2][col];
    end_of_line  = (col == CW'(IMG_W - 1));
    end_of_frame = end_of_line && (row == RW'(IMG_H - 1));
  end

  // Row banks: one write port, written at the current column of the
  // selected bank.
  always_ff @(posedge clk) begin
    if (in_valid) bank[sel][col] <= in_pix;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col        <= '0;
      row        <= '0;
      sel        <= '0;
      win_valid  <= 1'b0;
      win_last   <= 1'b0;
      win        <= '0;
    end else begin
      win_valid <= 1'b0;
      win_last  <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < 3; i++) begin
          win[i][0] <= win[i][1];
          win[i][1] <= win[i][2];
        end
        win[0][2] <= up2;
        win[1][2] <= up1;
        win[2][2] <= in_pix;
        win_valid  <= (row >= RW'(2)) && (col >= CW'(2));
        win_last   <= end_of_frame;
        if (end_of_frame) begin
          col <= '0;
          row <= '0;
          sel <= '0;
        end else if (end_of_line) begin
          col <= '0;
          row <= row + RW'(1);
          sel <= (sel == 2'd2) ? 2'd0 : sel + 2'd1;
        end else begin
          col <= col + CW'(1);
        end
      end
    end
  end

  assign row_sel = sel;
endmodule
