// uart_tx: serial transmitter that returns result pixels to the host.
//
// Frame format (this design's choice, matching uart_rx): 1 start bit
// (low), 8 data bits LSB first, 1 stop bit (high), no parity, each bit
// CLKS_PER_BIT clocks long. txd idles high.
//
// Interface: valid/ready handshake. in_ready is high while the
// transmitter is idle; a byte is taken in a cycle where in_valid and
// in_ready are both high and its start bit begins on the next clock. A
// byte occupies the line for 10 * CLKS_PER_BIT clocks; in_ready returns one
// clock after the stop bit ends.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = morph_pkg::CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       txd
);
  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  logic             busy;
  logic [CNT_W-1:0] cnt;
  logic [3:0]       bit_idx;   // 0 = start, 1..8 = data, 9 = stop
  logic [9:0]       frame;

  assign in_ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
      txd     <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (in_valid) begin
        busy    <= 1'b1;
        frame   <= {1'b1, in_data, 1'b0};
        cnt     <= '0;
        bit_idx <= '0;
        txd     <= 1'b0;
      end
    end else begin
      if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 4'd1;
          txd     <= frame[bit_idx + 4'd1];
        end
      end else begin
        cnt <= cnt + CNT_W'(1);
      end
    end
  end

  // A byte must be held stable while it waits for the transmitter.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_data));
endmodule
