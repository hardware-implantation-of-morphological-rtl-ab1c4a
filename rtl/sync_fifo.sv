// sync_fifo: small single-clock first-in first-out buffer for result
// pixels between the filter and the UART transmitter.
//
// The filter emits results in bursts of up to one per clock while the
// transmitter needs 10 bit times per byte, so the filter output is queued
// here. This plays the part of the FIFO-based point-to-point link by which
// the filtering co-processor returns data; the depth is this design's own
// choice. Storage is a circular array with read and write pointers and an
// occupancy counter.
//
// Interface: push/push_data write when not full; pop reads the word shown
// on pop_data (first-word fall-through) when not empty. A push while full
// is dropped and raises overflow for one clock; a pop while empty is
// ignored. A push and a pop in the same clock are both served.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] pop_data,
  output logic             empty,
  output logic             full,
  output logic             overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_push, do_pop;

  always_comb begin
    empty    = (count == '0);
    full     = (count == (AW+1)'(DEPTH));
    do_pop   = pop && !empty;
    do_push  = push && (!full || do_pop);
    pop_data = mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + AW'(1);
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + AW'(1);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
