// tb_uart_tx: offers bytes to uart_tx with 16 clocks per bit, some as soon
// as in_ready returns and some after idle gaps, and decodes txd by sampling
// each bit in its middle. Checks: the line idles high, each start bit is
// low and begins the clock after the handshake, the data bits carry the
// byte LSB first, the stop bit is high, and the transmitter is busy for
// exactly 10 bit times per byte.
module tb_uart_tx;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, txd;
  logic [7:0] in_data = 0;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_check(input logic [7:0] b);
    logic [7:0] got;
    int busy;
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_data = b;
    @(negedge clk);               // handshake at the rising edge before this
    in_valid = 0; in_data = $urandom_range(255);
    chk(!in_ready, "busy after handshake");
    chk(txd == 0, "start bit begins");
    repeat (N/2) @(negedge clk);
    chk(txd == 0, "start bit middle");
    for (int i = 0; i < 8; i++) begin
      repeat (N) @(negedge clk);
      got[i] = txd;
    end
    repeat (N) @(negedge clk);
    chk(txd == 1, "stop bit");
    chk(got == b, $sformatf("sent %02x, line carried %02x", b, got));
    // in_ready must return exactly 10 bit times after the handshake.
    busy = N/2 + 9*N;
    while (!in_ready) begin @(negedge clk); busy++; end
    chk(busy == 10*N, $sformatf("byte time %0d clocks", busy));
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
    repeat (4) @(negedge clk);
    chk(txd == 1 && in_ready, "idle line high and ready");
    send_check(8'h00);
    send_check(8'hFF);
    send_check(8'h81);
    repeat (23) @(negedge clk);
    chk(txd == 1, "idle between bytes");
    for (int k = 0; k < 30; k++) begin
      if (k % 3 == 0) repeat ($urandom_range(20)) @(negedge clk);
      send_check(8'($urandom_range(255)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
