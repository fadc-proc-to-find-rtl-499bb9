// fadc_top: digital back end of the 16-input FADC+processor module for
// APV25 silicon strip readout, with on-board hit time calculation.
//
// Each input carries the reordered, pedestal- and common-mode-corrected
// samples of one APV25 (128 strips, 6 time samples 25 ns apart per trigger)
// with a hit bit per sample. Inputs are grouped by 4, as on one processing
// FPGA: each group has a time_calc_unit that stores the event in 24
// dual-port memories, scans every strip with a hit, finds the maximum among
// the 6 samples and its fine time with two look-up tables, and sends either a
// hit word with time or, when no unambiguous time can be found, the 6 raw
// pulse heights with a marker. The final_data_block collects the units' words
// into one block per trigger (main header, input headers, hit words, input
// trailers, main trailer with CRC16) and sends it as 32 data + 4 control bits
// towards the Finesse receiver. The event_checker compares the channel event
// numbers with the system event number and watches for missing inputs. The
// transparent_spy keeps the complete data of one selected input and time
// block of every 256th event for the VME system (bits 31-23 of its read
// word are constant 0 by the word layout).
//
// The per-input hit processors (reorder, common-mode correction, threshold),
// the ADCs and the VME controller are outside this design: their signals are
// the ports. All look-up tables receive the same contents through one load
// port. Ports: arrays indexed by module input 0..15 or unit 0..3.
module fadc_top
  import fadc_pkg::*;
#(
  parameter int unsigned N_UNITS        = 4,
  parameter int unsigned N_IN           = 4,
  parameter int unsigned N_STRIPS       = 128,
  parameter int unsigned IN_FIFO_DEPTH  = 128,
  parameter int unsigned OUT_FIFO_DEPTH = 16384,
  parameter int unsigned FIN_FIFO_DEPTH = 2048,
  parameter int unsigned SPY_PRESCALE   = 256,
  localparam int unsigned N_TOT = N_UNITS * N_IN,
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the per-input hit processors
  input  logic               adc_valid  [N_TOT],
  input  strip_word_t        adc_data   [N_TOT],
  output logic               adc_ready  [N_TOT],
  input  logic               apv_header [N_TOT],
  input  logic               corr_valid [N_TOT],
  input  logic signed [8:0]  corr1      [N_TOT],
  input  logic signed [6:0]  corr2      [N_TOT],
  // configuration and trigger information (VME / controller)
  input  sample_t            limit,
  input  logic               in_hdr_en,
  input  logic               in_trl_en,
  input  logic [3:0]         trig_type,
  input  logic [2:0]         data_type,
  input  logic [4:0]         trig_time,
  input  logic [1:0]         crate,
  input  logic [4:0]         module_no,
  input  logic [7:0]         event_number,
  input  logic               lut_we,
  input  logic               lut_sel,
  input  logic [15:0]        lut_addr,
  input  logic [8:0]         lut_wdata,
  // monitoring
  input  logic               stat_clear,
  output logic [31:0]        n_lut      [N_UNITS],
  output logic [31:0]        n_nofit    [N_UNITS],
  output logic [31:0]        n_multimax [N_UNITS],
  output logic [31:0]        n_border   [N_UNITS],
  output logic [31:0]        n_small    [N_UNITS],
  output logic [31:0]        n_stall    [N_UNITS],
  input  logic [IW+5:0]      hist_addr,
  output logic [15:0]        hist_data  [N_UNITS],
  output logic [6:0]         chan_event [N_TOT],
  output logic [N_TOT-1:0]   evnum_err,
  output logic [N_TOT-1:0]   missing,
  output logic signed [15:0] bal1       [N_TOT],
  output logic signed [15:0] bal2       [N_TOT],
  // transparent data of one input and time block, for the VME system
  input  logic               spy_en,
  input  logic [3:0]         spy_sel_input,
  input  logic [2:0]         spy_sel_tb,
  input  logic               spy_ack,
  output logic               spy_full,
  input  logic [$clog2(N_STRIPS)-1:0] spy_rd_addr,
  output logic [31:0]        spy_rd_data,
  // towards Finesse
  output logic               fin_valid,
  output logic [31:0]        fin_data,
  output ctrl_t              fin_ctrl,
  input  logic               fin_ready
);
  logic        u_valid [N_UNITS];
  logic        u_eoi   [N_UNITS];
  logic [31:0] u_word  [N_UNITS];
  logic        u_ready [N_UNITS];
  logic        blk_start;
  logic [8:0]  corr1_u [N_TOT];
  logic [6:0]  corr2_u [N_TOT];

  for (genvar g = 0; g < N_UNITS; g++) begin : g_unit
    logic        in_valid [N_IN];
    strip_word_t in_data  [N_IN];
    logic        in_ready [N_IN];
    logic        scanning_unused;

    for (genvar i = 0; i < N_IN; i++) begin : g_map
      assign in_valid[i]          = adc_valid[g*N_IN + i];
      assign in_data[i]           = adc_data[g*N_IN + i];
      assign adc_ready[g*N_IN + i] = in_ready[i];
    end

    time_calc_unit #(
      .N_IN(N_IN), .N_STRIPS(N_STRIPS),
      .IN_FIFO_DEPTH(IN_FIFO_DEPTH), .OUT_FIFO_DEPTH(OUT_FIFO_DEPTH)
    ) u_tcu (
      .clk(clk), .rst_n(rst_n), .input_base(INPUT_W'(g * N_IN)), .limit(limit),
      .in_valid(in_valid), .in_data(in_data), .in_ready(in_ready),
      .out_valid(u_valid[g]), .out_eoi(u_eoi[g]), .out_word(u_word[g]), .out_ready(u_ready[g]),
      .lut_we(lut_we), .lut_sel(lut_sel), .lut_addr(lut_addr), .lut_wdata(lut_wdata),
      .stat_clear(stat_clear),
      .n_lut(n_lut[g]), .n_nofit(n_nofit[g]), .n_multimax(n_multimax[g]),
      .n_border(n_border[g]), .n_small(n_small[g]),
      .hist_addr(hist_addr), .hist_data(hist_data[g]), .n_stall(n_stall[g]),
      .scanning(scanning_unused)
    );
  end

  logic        adc_fire [N_TOT];
  logic        spy_capturing;
  logic [3:0]  spy_input;
  logic [2:0]  spy_tb;
  for (genvar n = 0; n < N_TOT; n++) begin : g_fire
    assign adc_fire[n] = adc_valid[n] && adc_ready[n];
  end

  transparent_spy #(.N_TOT(N_TOT), .N_STRIPS(N_STRIPS), .PRESCALE(SPY_PRESCALE)) u_spy (
    .clk(clk), .rst_n(rst_n), .in_fire(adc_fire), .in_data(adc_data),
    .spy_en(spy_en), .sel_input(spy_sel_input), .sel_tb(spy_sel_tb), .spy_ack(spy_ack),
    .spy_full(spy_full), .capturing(spy_capturing), .spy_input(spy_input), .spy_tb(spy_tb),
    .rd_addr(spy_rd_addr), .rd_data(spy_rd_data)
  );

  event_checker #(.N_IN(N_TOT)) u_chk (
    .clk(clk), .rst_n(rst_n), .apv_header(apv_header), .corr_valid(corr_valid),
    .corr1(corr1), .corr2(corr2), .check(blk_start), .sys_event(event_number),
    .chan_event(chan_event), .evnum_err(evnum_err), .missing(missing),
    .hdr_corr1(corr1_u), .hdr_corr2(corr2_u),
    .bal1(bal1), .bal2(bal2)
  );

  final_data_block #(.N_UNITS(N_UNITS), .N_IN(N_IN), .FIFO_DEPTH(FIN_FIFO_DEPTH)) u_fin (
    .clk(clk), .rst_n(rst_n), .in_hdr_en(in_hdr_en), .in_trl_en(in_trl_en),
    .trig_type(trig_type), .data_type(data_type), .trig_time(trig_time), .crate(crate),
    .module_no(module_no), .event_number(event_number),
    .chan_event(chan_event), .corr1(corr1_u), .corr2(corr2_u),
    .evnum_err(evnum_err), .missing(missing),
    .u_valid(u_valid), .u_eoi(u_eoi), .u_word(u_word), .u_ready(u_ready),
    .start(blk_start),
    .fin_valid(fin_valid), .fin_data(fin_data), .fin_ctrl(fin_ctrl), .fin_ready(fin_ready)
  );
endmodule
