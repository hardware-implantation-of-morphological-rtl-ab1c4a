// tb_row_cel: drives two frames of random 8-bit pixels, with random idle
// cycles between pixels, into a 5 x 6 row_cel. After every accepted pixel it
// checks, one clock later, that win_valid is set exactly for pixels that
// complete a window (line >= 2, column >= 2), that the 3 x 3 window equals
// the image pixels at lines r-2..r and columns c-2..c, that win_last marks
// the frame's last window, and that the bank select steps 0 -> 1 -> 2 -> 0
// at each line end and returns to 0 at the frame end.
module tb_row_cel;
  localparam int W = 5, H = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_pix = 0;
  logic [2:0][2:0][7:0] win;
  logic win_valid, win_last;
  logic [1:0] row_sel;
  int checks = 0, failures = 0, windows = 0;

  row_cel #(.PIX_W(8), .IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[];
    img = new[W*H];
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(row_sel == 2'd0, "row_sel after reset");
    for (int f = 0; f < 2; f++) begin
      foreach (img[i]) img[i] = $urandom_range(255);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          repeat ($urandom_range(2)) @(negedge clk);
          in_valid = 1; in_pix = 8'(img[r*W+c]);
          @(negedge clk);
          in_valid = 0;
          chk(win_valid == (r >= 2 && c >= 2), $sformatf("win_valid f%0d r%0d c%0d", f, r, c));
          chk(win_last == (r == H-1 && c == W-1), "win_last");
          chk(int'(row_sel) == ((c == W-1) ? ((r == H-1) ? 0 : (r+1) % 3) : r % 3),
              $sformatf("row_sel r%0d c%0d = %0d", r, c, row_sel));
          if (win_valid) begin
            windows++;
            for (int i = 0; i < 3; i++)
              for (int j = 0; j < 3; j++)
                chk(int'(win[i][j]) == img[(r-2+i)*W + (c-2+j)],
                    $sformatf("win[%0d][%0d] at r%0d c%0d", i, j, r, c));
          end
        end
    end
    chk(windows == 2*(W-2)*(H-2), "window count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
