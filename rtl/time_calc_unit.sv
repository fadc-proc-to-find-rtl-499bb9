// time_calc_unit: hit time calculation for 4 inputs (4 APV25 chips, one
// detector), as one processing FPGA of the module would do it.
//
// Data path: each input delivers, per trigger, 6 time blocks of 128 strip
// words (pulse height + hit bit) already reordered and corrected. A 128 x 9
// FIFO per input decouples the input from the unit. In the WRITE phase every
// input moves its words from the FIFO into its 6 time-block memories of the
// strip_time_buffer (time block 1..6, strip 1..128, in arrival order). When
// all inputs have stored a full event the unit switches to SCAN: it reads the
// buffer strip by strip, input 0 to N_IN-1, and every strip that has the hit
// bit set in at least one of its 6 time blocks is handed, with its 6 pulse
// heights, to the hit_time_processor. Strips without a hit are dropped (zero
// suppression). After the last strip of an input the unit waits until the
// processor is empty and writes an end-of-input marker, so the downstream
// data block can frame the words of each input. After the last input it
// returns to WRITE; the input FIFOs have kept filling meanwhile and hold the
// inputs back (in_ready low) when they are full.
//
// Output: a FIFO of 33-bit entries {eoi, word}: eoi = 0 carries a 32-bit hit
// word, eoi = 1 marks the end of input word[3:0]. Statistics: the case
// counters and the time histogram of this unit's inputs.
// Timing: the scan issues one buffer read per clock and passes one strip per
// clock to the processor, except while the processor sends 6 raw words.
// The phase structure (whole event in, then scan) follows from the single
// set of 24 memories; the marker words and FIFO handshakes are this design's.
module time_calc_unit
  import fadc_pkg::*;
#(
  parameter int unsigned N_IN           = 4,
  parameter int unsigned N_STRIPS       = 128,
  parameter int unsigned IN_FIFO_DEPTH  = 128,
  parameter int unsigned OUT_FIFO_DEPTH = 16384,
  localparam int unsigned SW = $clog2(N_STRIPS),
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [INPUT_W-1:0] input_base,     // module input number of local input 0
  input  sample_t            limit,          // small-pulse threshold
  // strip words from the hit processors
  input  logic               in_valid [N_IN],
  input  strip_word_t        in_data  [N_IN],
  output logic               in_ready [N_IN],
  // output FIFO, first-word fall-through
  output logic               out_valid,
  output logic               out_eoi,
  output logic [31:0]        out_word,
  input  logic               out_ready,
  // look-up table load port
  input  logic               lut_we,
  input  logic               lut_sel,
  input  logic [15:0]        lut_addr,
  input  logic [8:0]         lut_wdata,
  // statistics
  input  logic               stat_clear,
  output logic [31:0]        n_lut,
  output logic [31:0]        n_nofit,
  output logic [31:0]        n_multimax,
  output logic [31:0]        n_border,
  output logic [31:0]        n_small,
  input  logic [IW+5:0]      hist_addr,
  output logic [15:0]        hist_data,
  output logic [31:0]        n_stall,        // clocks with an input held back
  output logic               scanning
);
  typedef enum logic [1:0] {S_WRITE, S_SCAN, S_DRAIN} state_t;
  state_t state;

  // ---------------- input FIFOs and write side ----------------
  strip_word_t          f_data [N_IN];
  logic                 f_empty [N_IN];
  logic                 f_full  [N_IN];
  logic                 f_pop   [N_IN];
  logic                 we      [N_IN];
  logic [2:0]           we_tb   [N_IN];
  logic [SW-1:0]        we_strip[N_IN];
  logic [N_IN-1:0]      done;
  logic                 any_stall;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    logic [$clog2(IN_FIFO_DEPTH):0] cnt_unused;
    sync_fifo #(.WIDTH($bits(strip_word_t)), .DEPTH(IN_FIFO_DEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n),
      .wr_en(in_valid[i] && !f_full[i]), .wr_data(in_data[i]), .full(f_full[i]),
      .rd_en(f_pop[i]), .rd_data(f_data[i]), .empty(f_empty[i]), .count(cnt_unused)
    );
    assign in_ready[i] = !f_full[i];
    assign f_pop[i]    = (state == S_WRITE) && !done[i] && !f_empty[i];
    assign we[i]       = f_pop[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        we_tb[i]    <= '0;
        we_strip[i] <= '0;
        done[i]     <= 1'b0;
      end else if (state == S_WRITE && &done) begin
        done[i] <= 1'b0;
      end else if (f_pop[i]) begin
        if (we_strip[i] == SW'(N_STRIPS - 1)) begin
          we_strip[i] <= '0;
          if (we_tb[i] == 3'(N_TB - 1)) begin
            we_tb[i] <= '0;
            done[i]  <= 1'b1;
          end else begin
            we_tb[i] <= we_tb[i] + 3'd1;
          end
        end else begin
          we_strip[i] <= we_strip[i] + 1'b1;
        end
      end
    end
  end

  always_comb begin
    any_stall = 1'b0;
    for (int i = 0; i < N_IN; i++) any_stall |= in_valid[i] && f_full[i];
  end

  // ---------------- strip/time buffer ----------------
  logic              rd_en;
  logic [IW+SW-1:0]  rd_addr;
  strip_word_t       rd_data [N_TB];

  strip_time_buffer #(.N_IN(N_IN), .N_STRIPS(N_STRIPS)) u_buf (
    .clk(clk), .we(we), .we_tb(we_tb), .we_strip(we_strip), .we_data(f_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data)
  );

  // ---------------- scan ----------------
  logic [IW-1:0]  cur_in;
  logic [SW:0]    iss_strip;    // next strip to read, N_STRIPS when all issued
  logic [SW-1:0]  pend_strip;   // strip whose data is on rd_data
  logic           rd_pending;
  logic           any_hit, consume, issue, tok_push;
  logic           p_in_valid, p_in_ready, p_out_valid, p_out_ready, p_idle;
  logic [31:0]    p_out_word;
  sample_t        p_t [N_TB];
  ev_class_t      ev_class;
  logic           ev_valid;
  logic [1:0]     hit_coarse;
  logic [3:0]     hit_fine;

  always_comb begin
    any_hit = 1'b0;
    for (int t = 0; t < N_TB; t++) begin
      any_hit |= rd_data[t].hit;
      p_t[t]   = rd_data[t].height;
    end
  end

  assign consume    = (state == S_SCAN) && rd_pending && (!any_hit || p_in_ready);
  assign issue      = (state == S_SCAN) && (!rd_pending || consume) && (iss_strip != (SW+1)'(N_STRIPS));
  assign rd_en      = issue;
  assign rd_addr    = {cur_in, iss_strip[SW-1:0]};
  assign p_in_valid = (state == S_SCAN) && rd_pending && any_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_WRITE;
      cur_in     <= '0;
      iss_strip  <= '0;
      pend_strip <= '0;
      rd_pending <= 1'b0;
    end else begin
      unique case (state)
        S_WRITE: if (&done) begin
          state     <= S_SCAN;
          cur_in    <= '0;
          iss_strip <= '0;
        end
        S_SCAN: begin
          if (issue) begin
            iss_strip  <= iss_strip + 1'b1;
            pend_strip <= iss_strip[SW-1:0];
          end
          rd_pending <= issue ? 1'b1 : (consume ? 1'b0 : rd_pending);
          if (consume && !issue && iss_strip == (SW+1)'(N_STRIPS)) state <= S_DRAIN;
        end
        S_DRAIN: if (tok_push) begin
          if (cur_in == IW'(N_IN - 1)) begin
            state <= S_WRITE;
          end else begin
            state     <= S_SCAN;
            cur_in    <= cur_in + 1'b1;
            iss_strip <= '0;
          end
        end
        default: state <= S_WRITE;
      endcase
    end
  end

  hit_time_processor u_proc (
    .clk(clk), .rst_n(rst_n), .limit(limit),
    .in_valid(p_in_valid), .in_ready(p_in_ready), .in_t(p_t),
    .in_input(input_base + INPUT_W'(cur_in)), .in_pos(STRIP_W'(pend_strip)),
    .out_valid(p_out_valid), .out_ready(p_out_ready), .out_word(p_out_word),
    .ev_valid(ev_valid), .ev_class(ev_class), .hit_coarse(hit_coarse), .hit_fine(hit_fine),
    .idle(p_idle),
    .lut_we(lut_we), .lut_sel(lut_sel), .lut_addr(lut_addr), .lut_wdata(lut_wdata)
  );

  // ---------------- output FIFO ----------------
  logic        o_full, o_empty;
  logic [32:0] o_wdata, o_rdata;
  logic [$clog2(OUT_FIFO_DEPTH):0] o_cnt_unused;

  assign tok_push    = (state == S_DRAIN) && p_idle && !o_full;
  assign p_out_ready = !o_full;
  assign o_wdata     = tok_push ? {1'b1, 28'd0, input_base + INPUT_W'(cur_in)} : {1'b0, p_out_word};

  sync_fifo #(.WIDTH(33), .DEPTH(OUT_FIFO_DEPTH)) u_ofifo (
    .clk(clk), .rst_n(rst_n),
    .wr_en(tok_push || p_out_valid), .wr_data(o_wdata), .full(o_full),
    .rd_en(out_ready && !o_empty), .rd_data(o_rdata), .empty(o_empty), .count(o_cnt_unused)
  );
  assign out_valid = !o_empty;
  assign out_eoi   = o_rdata[32];
  assign out_word  = o_rdata[31:0];

  // ---------------- statistics ----------------
  case_counters #(.CW(32)) u_cnt (
    .clk(clk), .rst_n(rst_n), .clear(stat_clear), .ev_valid(ev_valid), .ev_class(ev_class),
    .n_lut(n_lut), .n_nofit(n_nofit), .n_multimax(n_multimax), .n_border(n_border), .n_small(n_small)
  );

  logic [INPUT_W-1:0] hist_in_global;
  assign hist_in_global = p_out_word[19:16] - input_base;

  time_histogram #(.N_IN(N_IN), .BINS(64), .HW(16)) u_hist (
    .clk(clk), .rst_n(rst_n), .clear(stat_clear),
    .hit_valid(ev_valid && ev_class == EV_SINGLE),
    .hit_input(hist_in_global[IW-1:0]), .hit_bin({hit_coarse, hit_fine}),
    .rd_addr(hist_addr), .rd_data(hist_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           n_stall <= '0;
    else if (stat_clear)  n_stall <= '0;
    else if (any_stall)   n_stall <= n_stall + 1'b1;
  end

  assign scanning = (state != S_WRITE);

  a_no_proc_loss: assert property (@(posedge clk) disable iff (!rst_n) !(tok_push && p_out_valid));
endmodule
