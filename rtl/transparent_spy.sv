// transparent_spy: transparent-data capture for the slow control path.
//
// Besides the hit data, the module can deliver the complete data of one
// input and one time block, i.e. all 128 strip words with and without hit
// bit, at a reduced rate (one event in PRESCALE), for the VME system to
// check pedestals, thresholds and the reorder. This block watches the strip
// word streams going into the time calculators. It keeps, per input, the
// position of the next word in the event (time block 1..6, strip 1..128, in
// arrival order) and an event count. When capturing is enabled and the spy
// memory is free, the first event of the selected input whose event count is
// a multiple of PRESCALE is picked at its first word; the 128 words of the
// selected time block are then written into a 128 x 9 memory. spy_full is
// set when the last strip is stored and stays set until spy_ack, so the
// memory is not overwritten while it is read.
//
// Interface: in_fire[n]/in_data[n] is a word accepted on input n. sel_input
// and sel_tb (1..6; other values select time block 1) are sampled when a
// capture starts and reported back as spy_input/spy_tb. rd_addr reads the
// memory with one clock latency; rd_data is a 32-bit word in the module's
// transparent layout: bits 31-23 zero, 22-20 time block, 19-16 input, 15-9
// strip, 8-0 the 9-bit strip word (hit bit and pulse height).
// The rate 1/256 and the choice of one input and one time block follow the
// module's description; the capture protocol (enable, full, acknowledge),
// the memory and the word layout beyond bits 19-16 and 8-0 are this design's.
module transparent_spy
  import fadc_pkg::*;
#(
  parameter int unsigned N_TOT    = 16,
  parameter int unsigned N_STRIPS = 128,
  parameter int unsigned PRESCALE = 256,
  localparam int unsigned SW = $clog2(N_STRIPS),
  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1,
  localparam int unsigned NW = (N_TOT > 1) ? $clog2(N_TOT) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_fire   [N_TOT],
  input  strip_word_t       in_data   [N_TOT],
  input  logic              spy_en,
  input  logic [NW-1:0]     sel_input,
  input  logic [2:0]        sel_tb,
  input  logic              spy_ack,
  output logic              spy_full,
  output logic              capturing,
  output logic [NW-1:0]     spy_input,
  output logic [2:0]        spy_tb,
  input  logic [SW-1:0]     rd_addr,
  output logic [31:0]       rd_data
);
  logic [SW-1:0] pos_strip [N_TOT];
  logic [2:0]    pos_tb    [N_TOT];
  logic [PW-1:0] ev_cnt    [N_TOT];
  strip_word_t   mem [N_STRIPS];
  strip_word_t   q;
  logic [SW-1:0] rd_addr_q;

  // per-input position in the event and event count
  for (genvar n = 0; n < N_TOT; n++) begin : g_pos
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pos_strip[n] <= '0;
        pos_tb[n]    <= '0;
        ev_cnt[n]    <= '0;
      end else if (in_fire[n]) begin
        if (pos_strip[n] == SW'(N_STRIPS - 1)) begin
          pos_strip[n] <= '0;
          if (pos_tb[n] == 3'(N_TB - 1)) begin
            pos_tb[n] <= '0;
            ev_cnt[n] <= (ev_cnt[n] == PW'(PRESCALE - 1)) ? '0 : ev_cnt[n] + 1'b1;
          end else begin
            pos_tb[n] <= pos_tb[n] + 3'd1;
          end
        end else begin
          pos_strip[n] <= pos_strip[n] + 1'b1;
        end
      end
    end
  end

  // capture control
  logic [2:0]    sel_tb0;     // requested time block, 0-based
  logic [2:0]    cap_tb0;
  logic          start;
  logic [NW-1:0] cur_in;
  logic [2:0]    cur_tb0;
  logic          wr;

  always_comb begin
    sel_tb0 = (sel_tb >= 3'd1 && sel_tb <= 3'(N_TB)) ? sel_tb - 3'd1 : 3'd0;
    start   = spy_en && !spy_full && !capturing && in_fire[sel_input]
              && pos_strip[sel_input] == '0 && pos_tb[sel_input] == '0
              && ev_cnt[sel_input] == '0;
    cur_in  = capturing ? spy_input : sel_input;
    cur_tb0 = capturing ? cap_tb0 : sel_tb0;
    wr      = (capturing || start) && in_fire[cur_in] && pos_tb[cur_in] == cur_tb0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      capturing <= 1'b0;
      spy_full  <= 1'b0;
      spy_input <= '0;
      cap_tb0   <= '0;
    end else begin
      if (start) begin
        capturing <= 1'b1;
        spy_input <= sel_input;
        cap_tb0   <= sel_tb0;
      end
      if (wr && pos_strip[cur_in] == SW'(N_STRIPS - 1)) begin
        capturing <= 1'b0;
        spy_full  <= 1'b1;
      end else if (spy_ack) begin
        spy_full  <= 1'b0;
      end
    end
  end

  assign spy_tb = cap_tb0 + 3'd1;

  always_ff @(posedge clk) begin
    if (wr) mem[pos_strip[cur_in]] <= in_data[cur_in];
    q         <= mem[rd_addr];
    rd_addr_q <= rd_addr;
  end

  assign rd_data = {9'd0, spy_tb, INPUT_W'(spy_input), STRIP_W'(rd_addr_q), q};
endmodule
