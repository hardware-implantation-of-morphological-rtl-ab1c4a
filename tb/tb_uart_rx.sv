// tb_uart_rx: bit-bangs 8N1 frames into uart_rx with 16 clocks per bit:
// all-zero, all-one, alternating and random bytes, some back-to-back and
// some after idle time, plus a frame with a low stop bit (must raise
// frame_err and deliver nothing) and a short low glitch on an idle line
// (must be ignored). Each byte must be delivered exactly once, with the
// right value, within one bit time after the middle of its stop bit.
module tb_uart_rx;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic out_valid, frame_err;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int got_q[$];
  int errs = 0;

  uart_rx #(.CLKS_PER_BIT(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) got_q.push_back(int'(out_data));
    if (rst_n && frame_err) errs++;
  end

  task automatic send(input logic [7:0] b, input bit stop = 1);
    rxd = 0; repeat (N) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (N) @(negedge clk); end
    // A low stop bit is released soon after the receiver samples it, so it
    // cannot be taken for the start bit of a further frame.
    rxd = stop; repeat (stop ? N : N/2 + 4) @(negedge clk);
    rxd = 1;
  endtask

  task automatic send_check(input logic [7:0] b);
    int n0 = got_q.size();
    send(b);
    chk(got_q.size() == n0 + 1, $sformatf("byte %02x delivered", b));
    if (got_q.size() == n0 + 1)
      chk(got_q[n0] == int'(b), $sformatf("byte %02x received as %02x", b, got_q[n0]));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    send_check(8'h00);
    send_check(8'hFF);
    send_check(8'h55);
    repeat (37) @(negedge clk);
    send_check(8'hA5);
    // Bad stop bit: flagged, not delivered.
    begin
      int n0;
      n0 = got_q.size();
      send(8'h3C, 0);
      repeat (2*N) @(negedge clk);
      chk(errs == 1, "frame_err on low stop bit");
      chk(got_q.size() == n0, "bad frame dropped");
    end
    // Glitch shorter than half a bit on an idle line.
    rxd = 0; repeat (N/4) @(negedge clk); rxd = 1;
    repeat (3*N) @(negedge clk);
    chk(got_q.size() == 4 && errs == 1, $sformatf("glitch ignored %0d %0d", got_q.size(), errs));
    for (int k = 0; k < 40; k++) send_check(8'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
