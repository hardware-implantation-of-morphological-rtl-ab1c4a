// uart_rx: serial receiver that brings the host's pixel stream into the
// filter.
//
// Frame format (this design's choice; the link is only named as a UART):
// 1 start bit (low), 8 data bits LSB first, 1 stop bit (high), no parity.
// The rxd line passes a two-flop synchroniser. A falling edge starts a
// frame; the line is re-checked half a bit later (a glitch returns to idle)
// and each data bit and the stop bit are then sampled in the middle of
// their bit time, CLKS_PER_BIT clocks apart.
//
// Interface: out_valid pulses for one clock with out_data once the stop bit
// has been sampled high. A low stop bit raises frame_err for one clock
// instead and the byte is discarded. The receiver cannot be stalled.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = morph_pkg::CLKS_PER_BIT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       frame_err
);
  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_t;

  rx_state_t        state;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;
  logic             rxd_m, rxd_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RX_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      frame_err <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          cnt <= '0;
          if (!rxd_s) state <= RX_START;
        end
        RX_START: begin
          if (cnt == CNT_W'((CLKS_PER_BIT - 1) / 2)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rxd_s ? RX_IDLE : RX_DATA;
          end else begin
            cnt <= cnt + CNT_W'(1);
          end
        end
        RX_DATA: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rxd_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 3'd1;
          end else begin
            cnt <= cnt + CNT_W'(1);
          end
        end
        RX_STOP: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= RX_IDLE;
            if (rxd_s) begin
              out_valid <= 1'b1;
              out_data  <= shreg;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + CNT_W'(1);
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end
endmodule
