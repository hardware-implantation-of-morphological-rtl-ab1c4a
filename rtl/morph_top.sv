// morph_top: serial-link morphological image filter.
//
// A host sends an 8-bit grey-scale image, in raster order, one pixel per
// UART byte. uart_rx turns the serial line into a pixel stream that feeds
// morph_filter, which computes either a 3 x 3 dilation (window maximum) or
// a 3 x 3 erosion (window minimum) using three round-robin line buffers.
// Result pixels are queued in sync_fifo and returned to the host by
// uart_tx. This receive -> filter -> transmit path follows the design
// description; the output queue, the UART frame format and the default bit
// time (434 clocks: 115200 baud from 50 MHz) are this design's own choices.
// The embedded processor, its buses and the off-chip memory of the full
// system are not part of this module.
//
// Ports: op_sel selects the operation (0 = dilation, 1 = erosion) and is
// sampled with the first pixel of each frame. frame_done pulses when the
// filter emits the last result of a frame. rx_frame_err pulses when a
// received byte had a bad stop bit (the byte is dropped). out_overflow is
// sticky and set if a result found the output queue full.
//
// Timing: per IMG_W x IMG_H input frame the host gets back
// (IMG_W-2) x (IMG_H-2) bytes; each result leaves the filter two clocks
// after uart_rx delivers the byte that completed its window, and is then
// queued until the transmitter is free.
module morph_top #(
  parameter int unsigned PIX_W        = morph_pkg::PIX_W,
  parameter int unsigned IMG_W        = morph_pkg::IMG_W,
  parameter int unsigned IMG_H        = morph_pkg::IMG_H,
  parameter int unsigned CLKS_PER_BIT = morph_pkg::CLKS_PER_BIT,
  parameter int unsigned FIFO_DEPTH   = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  input  logic op_sel,
  output logic op_active,
  output logic frame_done,
  output logic rx_frame_err,
  output logic out_overflow
);
  logic             rx_valid;
  logic [7:0]       rx_data;
  logic             f_valid, f_last;
  logic [PIX_W-1:0] f_pix;
  logic [PIX_W-1:0] q_data;
  logic             q_empty, q_ovf;
  logic             tx_ready;
  morph_pkg::morph_op_t op_act;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk, .rst_n, .rxd(uart_rxd),
    .out_valid(rx_valid), .out_data(rx_data), .frame_err(rx_frame_err)
  );

  morph_filter #(.PIX_W(PIX_W), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_filter (
    .clk, .rst_n,
    .op(morph_pkg::morph_op_t'(op_sel)),
    .in_valid(rx_valid), .in_pix(PIX_W'(rx_data)),
    .out_valid(f_valid), .out_pix(f_pix), .out_last(f_last),
    .op_active(op_act)
  );

  sync_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .push(f_valid), .push_data(f_pix),
    .pop(tx_ready && !q_empty), .pop_data(q_data),
    .empty(q_empty), .full(), .overflow(q_ovf)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk, .rst_n,
    .in_valid(!q_empty), .in_data(8'(q_data)), .in_ready(tx_ready),
    .txd(uart_txd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_overflow <= 1'b0;
    else if (q_ovf) out_overflow <= 1'b1;
  end

  assign frame_done = f_valid && f_last;
  assign op_active  = (op_act == morph_pkg::OP_ERODE);
endmodule
