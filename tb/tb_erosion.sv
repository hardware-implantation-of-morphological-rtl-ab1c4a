// tb_erosion: end-to-end check of the erosion unit. Three 9 x 7 frames are sent:
// one with random pixels and idle gaps, one back-to-back with random
// pixels, and one with a single bright (255) and a single dark (0) spot on
// a mid-grey field, which shows the 3 x 3 minimum spreading. Every result is
// compared with the minimum computed from the image array, and must appear
// exactly two clocks after the pixel that completes its window; out_last
// must mark each frame's last result.
module tb_erosion;
  import morph_ref_pkg::*;
  localparam int W = 9, H = 7;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_pix = 0;
  logic out_valid, out_last;
  logic [7:0] out_pix;
  int checks = 0, failures = 0, results = 0;
  int exp_at[int];      // cycle -> expected pixel
  int last_at[int];     // cycle -> 1 if that result ends a frame
  int cyc = 0;

  erosion #(.PIX_W(8), .IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Sample the outputs at every falling edge and compare with the schedule.
  task automatic tick();
    @(negedge clk);
    cyc++;
    if (exp_at.exists(cyc)) begin
      chk(out_valid, $sformatf("missing result at cycle %0d", cyc));
      if (out_valid) begin
        results++;
        chk(int'(out_pix) == exp_at[cyc],
            $sformatf("cycle %0d: got %0d expected %0d", cyc, out_pix, exp_at[cyc]));
        chk(out_last == last_at.exists(cyc), "out_last");
      end
    end else begin
      chk(!out_valid, $sformatf("unexpected result at cycle %0d", cyc));
    end
  endtask

  task automatic send_frame(input int img[], input bit gaps);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        if (gaps) repeat ($urandom_range(2)) tick();
        in_valid = 1; in_pix = 8'(img[r*W+c]);
        if (r >= 2 && c >= 2) begin
          exp_at[cyc+2] = win_ref(img, W, r, c, 1);
          if (r == H-1 && c == W-1) last_at[cyc+2] = 1;
        end
        tick();
        in_valid = 0;
      end
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
    foreach (img[i]) img[i] = $urandom_range(255);
    send_frame(img, 1);
    foreach (img[i]) img[i] = $urandom_range(255);
    send_frame(img, 0);
    foreach (img[i]) img[i] = 128;
    img[2*W+3] = 255;
    img[4*W+6] = 0;
    send_frame(img, 1);
    repeat (4) tick();
    chk(results == 3*(W-2)*(H-2), $sformatf("result count %0d", results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
