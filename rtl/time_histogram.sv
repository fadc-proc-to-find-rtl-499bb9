// time_histogram: per-input histogram of the calculated hit time, for the
// data control system. A correctly timed trigger shows up as a peak.
//
// The bin is the 6-bit hit time {coarse (2 bit, 25 ns), fine (4 bit,
// 25/16 ns)}, so 64 hist cover the 100 ns window. Each bin is a saturating
// counter of HW bits. A hit with hit_valid increments bin hit_bin of input
// hit_input in the next clock. rd_addr = {input, bin} reads a bin
// combinationally; clear zeroes all hist. Bin count, counter width and
// saturation are this design's choices.
module time_histogram #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned BINS = 64,
  parameter int unsigned HW   = 16,
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned BW = $clog2(BINS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             hit_valid,
  input  logic [IW-1:0]    hit_input,
  input  logic [BW-1:0]    hit_bin,
  input  logic [IW+BW-1:0] rd_addr,
  output logic [HW-1:0]    rd_data
);
  logic [HW-1:0] hist [N_IN*BINS];
  logic [IW+BW-1:0] waddr;

  assign waddr   = {hit_input, hit_bin};
  assign rd_data = hist[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_IN*BINS; k++) hist[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k < N_IN*BINS; k++) hist[k] <= '0;
    end else if (hit_valid && hist[waddr] != '1) begin
      hist[waddr] <= hist[waddr] + 1'b1;
    end
  end
endmodule
