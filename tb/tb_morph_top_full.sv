// tb_morph_top_full: full-size run of morph_top with every parameter at
// its default (128 x 128 8-bit image, 434 clocks per bit). A host model
// sends one complete image over uart_rxd for dilation, then a second one
// for erosion, and decodes uart_txd. All 126 x 126 results of each frame
// must match the reference 3 x 3 maximum / minimum in raster order, each
// frame must end with frame_done, and the output queue must not overflow.
// The image is a synthetic scene generated here: a smooth gradient with a
// bright disc, a dark bar and pseudo-random noise.
module tb_morph_top_full;
  import morph_ref_pkg::*;
  localparam int W = morph_pkg::IMG_W, H = morph_pkg::IMG_H, N = morph_pkg::CLKS_PER_BIT;
  logic clk = 0, rst_n = 0;
  logic uart_rxd = 1, uart_txd;
  logic op_sel = 0, op_active, frame_done, rx_frame_err, out_overflow;
  int checks = 0, failures = 0, n_done = 0;
  int exp_q[$], got_q[$];

  morph_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && frame_done) n_done++;

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (N/2) @(negedge clk);
      if (uart_txd == 0) begin
        for (int i = 0; i < 8; i++) begin repeat (N) @(negedge clk); b[i] = uart_txd; end
        repeat (N) @(negedge clk);
        chk(uart_txd == 1, "stop bit on uart_txd");
        got_q.push_back(int'(b));
      end
    end
  end

  task automatic send_byte(input logic [7:0] b);
    uart_rxd = 0; repeat (N) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (N) @(negedge clk); end
    uart_rxd = 1; repeat (N) @(negedge clk);
  endtask

  task automatic send_frame(input int img[], input bit erode);
    frame_ref(img, W, H, erode, exp_q);
    op_sel = erode;
    foreach (img[i]) send_byte(8'(img[i]));
  endtask

  initial begin
    repeat (2 * (W*H + 20) * 10 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[];
    img = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v = (r + c) % 200 + $urandom_range(40);
        if ((r-40)*(r-40) + (c-70)*(c-70) < 400) v = 250;
        if (r >= 90 && r < 94) v = 3;
        img[r*W+c] = v > 255 ? 255 : v;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    send_frame(img, 0);
    send_frame(img, 1);
    repeat (30*N) @(negedge clk);
    chk(got_q.size() == exp_q.size(),
        $sformatf("received %0d bytes, expected %0d", got_q.size(), exp_q.size()));
    foreach (exp_q[i])
      if (i < got_q.size()) begin
        checks++;
        if (got_q[i] != exp_q[i]) begin
          failures++;
          if (failures < 6) $display("FAIL result %0d: got %0d expected %0d", i, got_q[i], exp_q[i]);
        end
      end
    chk(n_done == 2, "frame_done per frame");
    chk(!out_overflow && !rx_frame_err, "no overflow, no framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
