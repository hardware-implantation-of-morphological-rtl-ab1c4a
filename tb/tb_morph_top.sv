// tb_morph_top: end-to-end test of the serial-link filter at a reduced
// size (8 x 6 image, 8 clocks per bit). A host model bit-bangs bytes into
// uart_rxd and decodes uart_txd. The run:
//   1. sends one byte with a low stop bit, which must be flagged and
//      dropped without disturbing the following frame;
//   2. sends frames with op_sel = dilation, erosion, erosion, dilation,
//      back to back, and one more dilation frame after an idle gap.
// Every byte returned must equal the reference 3 x 3 maximum or minimum,
// in raster order, and nothing more may arrive. The test counts the
// mechanisms of the design and fails if one never occurred: dilation
// frames, erosion frames, operation switches, line-bank wrap-around
// (bank 3 -> bank 1), frame ends, received-byte framing errors, and
// results queued while the transmitter was busy. The output queue must
// never overflow.
module tb_morph_top;
  import morph_ref_pkg::*;
  localparam int W = 8, H = 6, N = 8;
  logic clk = 0, rst_n = 0;
  logic uart_rxd = 1, uart_txd;
  logic op_sel = 0, op_active, frame_done, rx_frame_err, out_overflow;
  int checks = 0, failures = 0;
  int exp_q[$], got_q[$];
  int n_dil = 0, n_ero = 0, n_switch = 0, n_wrap = 0, n_done = 0, n_ferr = 0, n_queued = 0;

  morph_top #(.IMG_W(W), .IMG_H(H), .CLKS_PER_BIT(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Mechanism monitors.
  logic op_prev = 0;
  logic [1:0] sel_prev = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_filter.in_valid && dut.u_filter.pix_cnt == '0) begin
      if (op_active) n_ero++; else n_dil++;
      if (op_active != op_prev) n_switch++;
      op_prev <= op_active;
    end
    if (sel_prev == 2'd2 && dut.u_filter.u_dilation.u_row_cel.row_sel == 2'd0) n_wrap++;
    sel_prev <= dut.u_filter.u_dilation.u_row_cel.row_sel;
    if (frame_done) n_done++;
    if (rx_frame_err) n_ferr++;
    if (dut.f_valid && !dut.tx_ready) n_queued++;
  end

  // Host receiver: decodes the filter's serial output.
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

  task automatic send_byte(input logic [7:0] b, input bit stop = 1);
    uart_rxd = 0; repeat (N) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (N) @(negedge clk); end
    uart_rxd = stop; repeat (stop ? N : N/2 + 3) @(negedge clk);
    uart_rxd = 1;
  endtask

  task automatic send_frame(input bit erode);
    int img[];
    img = new[W*H];
    foreach (img[i]) img[i] = $urandom_range(255);
    frame_ref(img, W, H, erode, exp_q);
    op_sel = erode;
    foreach (img[i]) begin
      send_byte(8'(img[i]));
      op_sel = $urandom_range(1);   // ignored until the next frame starts
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ops[5] = '{0, 1, 1, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    send_byte(8'h5A, 0);
    repeat (3*N) @(negedge clk);
    foreach (ops[k]) begin
      if (k == 4) repeat (50) @(negedge clk);
      send_frame(ops[k]);
    end
    repeat (30*N) @(negedge clk);
    chk(got_q.size() == exp_q.size(),
        $sformatf("received %0d bytes, expected %0d", got_q.size(), exp_q.size()));
    foreach (exp_q[i])
      if (i < got_q.size())
        chk(got_q[i] == exp_q[i], $sformatf("result %0d: got %0d expected %0d", i, got_q[i], exp_q[i]));
    chk(!out_overflow, "no output overflow");
    $display("MECH dilation_frames=%0d erosion_frames=%0d op_switches=%0d bank_wraps=%0d frame_done=%0d framing_errors=%0d queued_results=%0d",
             n_dil, n_ero, n_switch, n_wrap, n_done, n_ferr, n_queued);
    chk(n_dil == 3, "dilation frames");
    chk(n_ero == 2, "erosion frames");
    chk(n_switch >= 2, "operation switches");
    chk(n_wrap >= 5, "line-bank wrap-around");
    chk(n_done == 5, "frame ends");
    chk(n_ferr == 1, "framing error");
    chk(n_queued > 0, "results queued behind the transmitter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
