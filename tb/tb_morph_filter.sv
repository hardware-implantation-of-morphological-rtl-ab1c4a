// tb_morph_filter: sends four 6 x 5 frames through the co-processor with
// the operations dilate, erode, erode, dilate. Frames follow each other with
// no idle cycle, so the last results of one frame leave the pipeline while
// the next frame with another operation has begun. op is also toggled in
// the middle of frames, which must have no effect: the operation is the one
// present with the frame's first pixel. Every result is compared with the
// reference maximum or minimum and must appear two clocks after the pixel
// completing its window; op_active must show the frame's operation.
module tb_morph_filter;
  import morph_ref_pkg::*;
  import morph_pkg::*;
  localparam int W = 6, H = 5;
  logic clk = 0, rst_n = 0;
  morph_op_t op = OP_DILATE, op_active;
  logic in_valid = 0;
  logic [7:0] in_pix = 0;
  logic out_valid, out_last;
  logic [7:0] out_pix;
  int checks = 0, failures = 0, results = 0, lasts = 0;
  int exp_at[int];
  int last_at[int];
  int cyc = 0;

  morph_filter #(.PIX_W(8), .IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

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
        if (out_last) lasts++;
      end
    end else begin
      chk(!out_valid, $sformatf("unexpected result at cycle %0d", cyc));
    end
  endtask

  task automatic send_frame(input int img[], input morph_op_t fop, input bit gaps);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        if (gaps) repeat ($urandom_range(1)) tick();
        // The frame's operation is presented with its first pixel only;
        // afterwards op carries the opposite value.
        op = (r == 0 && c == 0) ? fop : morph_op_t'(~fop);
        in_valid = 1; in_pix = 8'(img[r*W+c]);
        #1;
        chk(op_active == fop, $sformatf("op_active r%0d c%0d", r, c));
        if (r >= 2 && c >= 2) begin
          exp_at[cyc+2] = win_ref(img, W, r, c, fop == OP_ERODE);
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
    morph_op_t ops[4] = '{OP_DILATE, OP_ERODE, OP_ERODE, OP_DILATE};
    img = new[W*H];
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (ops[k]) begin
      foreach (img[i]) img[i] = $urandom_range(255);
      send_frame(img, ops[k], k == 0);
    end
    repeat (4) tick();
    chk(results == 4*(W-2)*(H-2), $sformatf("result count %0d", results));
    chk(lasts == 4, "frame ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
