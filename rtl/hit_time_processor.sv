// hit_time_processor: decision logic and time calculation for one strip with
// six time samples.
//
// For each strip the max_selector picks the three neighbouring samples whose
// middle one is a maximum; that gives the coarse time (0/25/50/75 ns). The
// left and centre samples address look-up table 1, its output and the upper
// 7 bits of the right sample address table 2, which gives the fine time
// (25/16 ns steps) and a "not found" flag. The event is then classified:
//   B  no maximum inside the window (maximum on the border)
//   C  more than one maximum
//   F  maximum below the amplitude limit (small pulse)
//   D  table reports that the pulse shape does not fit
//   A  otherwise: one hit word with time is sent.
// For B, C, F and D the time cannot be found on board: the six samples are
// sent as six raw words (time block 1..6) carrying the class as marker, and
// the input is stopped ("stop read") while they go out.
//
// Interface: valid/ready on both sides. in_t holds T1..T6 of one strip with
// its input number and strip position. out_word is a 32-bit word in the
// hit-with-time or the raw format of fadc_pkg. ev_valid/ev_class report each
// finished strip for the case counters and hit_fine/hit_coarse for the time
// histogram. limit is the small-pulse amplitude threshold.
// Timing: a 3-stage pipeline (select + table 1, table 2, output); one strip
// per clock for class A, 6 clocks for the other classes; latency 2 clocks
// from acceptance to the first output word. Bit 8 of every output word is
// constant 0: the format reserves 9 bits for the pulse height, the samples
// have 8. The stage order and the class
// encoding are this design's choice; the tables, the sample widths and the
// classes follow the description of the processor.
module hit_time_processor
  import fadc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  sample_t            limit,
  // strip in
  input  logic               in_valid,
  output logic               in_ready,
  input  sample_t            in_t [N_TB],
  input  logic [INPUT_W-1:0] in_input,
  input  logic [STRIP_W-1:0] in_pos,
  // word out
  output logic               out_valid,
  input  logic               out_ready,
  output logic [31:0]        out_word,
  // statistics
  output logic               ev_valid,
  output ev_class_t          ev_class,
  output logic [1:0]         hit_coarse,
  output logic [3:0]         hit_fine,
  output logic               idle,        // no strip inside the pipeline
  // table load port
  input  logic               lut_we,
  input  logic               lut_sel,
  input  logic [15:0]        lut_addr,
  input  logic [8:0]         lut_wdata
);
  typedef struct packed {
    logic               valid;
    logic [INPUT_W-1:0] inp;
    logic [STRIP_W-1:0] pos;
    logic               found;
    logic [2:0]         n_max;
    logic [1:0]         coarse;
    logic [2:0]         mid;
    sample_t            centre;
  } stage_t;

  logic       found;
  logic [2:0] n_max, mid;
  logic [1:0] coarse;
  sample_t    s_l, s_c, s_r;
  sample_t    s1_t [N_TB];
  sample_t    s2_t [N_TB];
  stage_t     s1, s2;
  logic [8:0] q1, q2;
  logic       adv, last;
  logic [2:0] raw_idx;
  ev_class_t  cls;

  max_selector u_sel (
    .t(in_t), .found(found), .n_max(n_max), .coarse(coarse), .mid(mid),
    .s_left(s_l), .s_centre(s_c), .s_right(s_r)
  );

  time_lut #(.AW(16), .DW(9)) u_lut (
    .clk(clk), .en(adv), .rd_addr1({s_l, s_c}), .rd_third(s_r[7:1]),
    .q1(q1), .q(q2),
    .we(lut_we), .we_sel(lut_sel), .waddr(lut_addr), .wdata(lut_wdata)
  );

  // Classification of the strip in the output stage.
  always_comb begin
    if (!s2.found)               cls = EV_BORDER;
    else if (s2.n_max > 3'd1)    cls = EV_MULTIMAX;
    else if (s2.centre < limit)  cls = EV_SMALL;
    else if (q2[8])              cls = EV_NOFIT;
    else                         cls = EV_SINGLE;
  end

  assign last      = (cls == EV_SINGLE) || (raw_idx == 3'(N_TB - 1));
  assign adv       = !s2.valid || (out_ready && last);
  assign in_ready  = adv;
  assign out_valid = s2.valid;
  assign out_word  = (cls == EV_SINGLE)
                   ? hit_time_word(q2[7:4], q2[3:0], s2.mid, s2.inp, s2.pos, s2.centre)
                   : raw_word(cls, raw_idx + 3'd1, s2.inp, s2.pos, s2_t[raw_idx]);
  assign ev_valid   = s2.valid && out_ready && last;
  assign ev_class   = cls;
  assign hit_coarse = s2.coarse;
  assign hit_fine   = q2[3:0];
  assign idle       = !s1.valid && !s2.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1      <= '0;
      s2      <= '0;
      raw_idx <= '0;
    end else begin
      if (adv) begin
        s1 <= '{valid: in_valid, inp: in_input, pos: in_pos, found: found,
                n_max: n_max, coarse: coarse, mid: mid, centre: s_c};
        s2 <= s1;
        raw_idx <= '0;
      end else if (out_ready && cls != EV_SINGLE) begin
        raw_idx <= raw_idx + 3'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      s1_t <= in_t;
      s2_t <= s1_t;
    end
  end

  a_raw_idx_range: assert property (@(posedge clk) disable iff (!rst_n) raw_idx < 3'(N_TB));
endmodule
