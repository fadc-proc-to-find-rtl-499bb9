// time_lut: the two chained look-up tables that turn three pulse-height
// samples around the maximum into a fine time.
//
// Table 1 is addressed by the left and centre samples (2 x 8 bit = 16 bit
// address) and gives 9 bits. Table 2 is addressed by those 9 bits and the
// upper 7 bits of the right sample (16 bit address) and gives the 9-bit
// result. The table contents depend on the shaping curve and are loaded from
// outside through the write port (sel = 0 for table 1, 1 for table 2); this
// design gives the tables no fixed contents.
//
// Result bits as used by the hit time processor (a choice of this design):
// [3:0] fine time in steps of 25/16 ns, [7:4] quality of the time
// information, [8] "not found": the samples do not fit the shaping curve.
//
// Timing: a pipeline of two synchronous reads that advances when en is high.
// rd_addr1/rd_third presented in a cycle with en appear as q after two
// further cycles with en; q1 is the table-1 output one en-cycle after.
module time_lut #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 9,
  parameter int unsigned TW = AW - DW   // bits of the third sample
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] rd_addr1,
  input  logic [TW-1:0] rd_third,
  output logic [DW-1:0] q1,
  output logic [DW-1:0] q,
  // load port
  input  logic          we,
  input  logic          we_sel,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] lut1 [2**AW];
  logic [DW-1:0] lut2 [2**AW];
  logic [TW-1:0] third_d;

  always_ff @(posedge clk) begin
    if (we && !we_sel) lut1[waddr] <= wdata;
    if (en) q1 <= lut1[rd_addr1];
  end

  always_ff @(posedge clk) begin
    if (we && we_sel) lut2[waddr] <= wdata;
    if (en) q <= lut2[{q1, third_d}];
  end

  always_ff @(posedge clk) begin
    if (en) third_d <= rd_third;
  end
endmodule
