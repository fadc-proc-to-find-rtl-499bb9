// sync_fifo: single-clock first-in first-out buffer.
//
// Used for every buffering stage of the readout chain: the 128 x 9 input FIFOs
// in front of the strip/time buffer, the FIFO that collects the hit words of a
// time calculator, and the FIFO of the final data block. The storage is a
// plain array (a dual-port memory in an FPGA) addressed by a write and a read
// pointer; one extra pointer bit separates full from empty.
//
// Interface: push when wr_en && !full, pop when rd_en && !empty. rd_data
// shows the oldest entry whenever !empty (first-word fall-through), so a
// consumer takes rd_data and asserts rd_en in the same cycle. count is the
// number of stored entries. Pushing into a full or popping from an empty
// FIFO is ignored (and flagged by an assertion).
// Depths are parameters; the defaults are those of the input FIFO (128 x 9).
module sync_fifo #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign empty = (wptr == rptr);
  assign count = wptr - rptr;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  // DEPTH must be a power of two for the pointer arithmetic above.
  initial assert ((1 << AW) == DEPTH) else $error("sync_fifo: DEPTH must be a power of two");

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
