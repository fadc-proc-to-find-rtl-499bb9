// strip_time_buffer: the 24 dual-port memories (128 x 9 bit) that hold one
// event of 4 inputs x 6 time blocks x 128 strips.
//
// Each input owns 6 memories, one per time block. An input writes its words
// in arrival order: the write port of input i selects the time block memory
// (the "enable time x, x+25, ... x+125 ns" lines) and the strip address.
// The read side uses a 9-bit address as in the memory map of the module:
// bits 6..0 select the strip inside an APV25 (strip 1..128), bits 8..7 are
// decoded into the enable of memories 1-128, 129-256, 257-384 or 385-512
// (input 0..3). One read returns all 6 time blocks of the addressed strip,
// so a strip and its 6 pulse heights come out together.
//
// Timing: writes take effect at the clock edge; the read is synchronous,
// rd_data is valid the cycle after rd_en. Reading and writing the same
// location in one cycle returns the old contents.
module strip_time_buffer
  import fadc_pkg::*;
#(
  parameter int unsigned N_IN     = 4,
  parameter int unsigned N_STRIPS = 128,
  localparam int unsigned SW = $clog2(N_STRIPS),
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic              clk,
  // one write port per input
  input  logic              we     [N_IN],
  input  logic [2:0]        we_tb  [N_IN],   // time block 0..5
  input  logic [SW-1:0]     we_strip [N_IN],
  input  strip_word_t       we_data[N_IN],
  // read: {input, strip}
  input  logic              rd_en,
  input  logic [IW+SW-1:0]  rd_addr,
  output strip_word_t       rd_data [N_TB]
);
  strip_word_t q [N_IN][N_TB];
  logic [IW-1:0] rd_in_q;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    for (genvar t = 0; t < N_TB; t++) begin : g_tb
      strip_word_t mem [N_STRIPS];
      always_ff @(posedge clk) begin
        if (we[i] && we_tb[i] == 3'(t)) mem[we_strip[i]] <= we_data[i];
        if (rd_en && rd_addr[IW+SW-1:SW] == IW'(i)) q[i][t] <= mem[rd_addr[SW-1:0]];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_in_q <= rd_addr[IW+SW-1:SW];
  end

  always_comb begin
    for (int t = 0; t < N_TB; t++) rd_data[t] = q[rd_in_q][t];
  end
endmodule
