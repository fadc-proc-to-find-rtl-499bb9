// final_data_block: builds the data block of one trigger for the Finesse
// link and buffers it in the final FIFO.
//
// Block layout, in order:
//   main header   bit31=0, 30-27 trigger type, 25-23 type of data,
//                 20-16 time of clock to trigger, 15-14 crate, 13-9 module,
//                 7-0 event number
//   for each input (unit 0 inputs 0..3, unit 1, ...):
//     input header  (if in_hdr_en) bit31=1, 29-23 channel event number,
//                   19-16 input, 15-9 second and 8-0 first common-mode correction
//     hit words of that input, as delivered by its time calculator
//     input trailer (if in_trl_en) bit31=1, 19-16 input, 1 missing, 0 event error
//   main trailer  31-16 CRC16 over all previous words of the block,
//                 15-0 mask of inputs with an error
// Every word carries the 4 control bits (HEADER, TRAILER, HALF_EV, DA_EN) of
// its type, see fadc_pkg. The header fields, the hit word formats and the
// control bits follow the module's data format; the trailer contents besides
// the CRC, the use of bits left open and the input order are this design's.
//
// Interface: one {valid, eoi, word, ready} stream per time calculator; eoi
// marks the end of one input's words. A block starts when unit 0 offers a
// word. start pulses for one clock when the main header is written (used to
// check event numbers). Output: 32 data bits + 4 control bits, first-word
// fall-through FIFO, popped with fin_ready (not busy).
// Timing: one word per clock into the FIFO while the source has data.
module final_data_block
  import fadc_pkg::*;
#(
  parameter int unsigned N_UNITS    = 4,
  parameter int unsigned N_IN       = 4,       // inputs per unit
  parameter int unsigned FIFO_DEPTH = 2048,
  localparam int unsigned N_TOT = N_UNITS * N_IN,
  localparam int unsigned UW = (N_UNITS > 1) ? $clog2(N_UNITS) : 1,
  localparam int unsigned KW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_hdr_en,
  input  logic               in_trl_en,
  // main header fields
  input  logic [3:0]         trig_type,
  input  logic [2:0]         data_type,
  input  logic [4:0]         trig_time,
  input  logic [1:0]         crate,
  input  logic [4:0]         module_no,
  input  logic [7:0]         event_number,
  // per-input header and trailer fields
  input  logic [6:0]         chan_event [N_TOT],
  input  logic [8:0]         corr1      [N_TOT],
  input  logic [6:0]         corr2      [N_TOT],
  input  logic [N_TOT-1:0]   evnum_err,
  input  logic [N_TOT-1:0]   missing,
  // unit streams
  input  logic               u_valid [N_UNITS],
  input  logic               u_eoi   [N_UNITS],
  input  logic [31:0]        u_word  [N_UNITS],
  output logic               u_ready [N_UNITS],
  output logic               start,
  // Finesse link
  output logic               fin_valid,
  output logic [31:0]        fin_data,
  output ctrl_t              fin_ctrl,
  input  logic               fin_ready
);
  typedef enum logic [2:0] {F_IDLE, F_MHDR, F_IHDR, F_DATA, F_ITRL, F_MTRL} fstate_t;
  fstate_t state;

  logic [UW-1:0] u;
  logic [KW-1:0] k;
  logic [INPUT_W-1:0] inp;
  logic        push, o_full, o_empty;
  logic [31:0] word;
  ctrl_t       ctrl;
  logic [15:0] crc;
  logic [35:0] o_rdata;
  logic [$clog2(FIFO_DEPTH):0] o_cnt_unused;
  logic        last_input;
  logic        src_valid, src_eoi;
  logic [31:0] src_word;
  logic [15:0] err_mask;

  assign inp        = INPUT_W'(u) * INPUT_W'(N_IN) + INPUT_W'(k);
  assign last_input = (u == UW'(N_UNITS - 1)) && (k == KW'(N_IN - 1));
  assign src_valid  = u_valid[u];
  assign src_eoi    = u_eoi[u];
  assign src_word   = u_word[u];
  assign err_mask   = 16'(evnum_err | missing);

  always_comb begin
    word = '0;
    ctrl = CTRL_DATA;
    push = 1'b0;
    unique case (state)
      F_MHDR: begin
        word = {1'b0, trig_type, 1'b0, data_type, 2'b00, trig_time, crate, module_no, 1'b0, event_number};
        ctrl = CTRL_MAIN_HEADER;
        push = !o_full;
      end
      F_IHDR: begin
        word = {1'b1, 1'b0, chan_event[inp], 3'b000, inp, corr2[inp], corr1[inp]};
        ctrl = CTRL_INPUT_HEADER;
        push = in_hdr_en && !o_full;
      end
      F_DATA: begin
        word = src_word;
        ctrl = CTRL_DATA;
        push = src_valid && !src_eoi && !o_full;
      end
      F_ITRL: begin
        word = {1'b1, 11'd0, inp, 14'd0, missing[inp], evnum_err[inp]};
        ctrl = CTRL_INPUT_TRAILER;
        push = in_trl_en && !o_full;
      end
      F_MTRL: begin
        word = {crc, err_mask};
        ctrl = CTRL_MAIN_TRAILER;
        push = !o_full;
      end
      default: ;
    endcase
  end

  always_comb begin
    for (int n = 0; n < N_UNITS; n++) u_ready[n] = 1'b0;
    if (state == F_DATA && !o_full) u_ready[u] = 1'b1;
  end

  assign start = (state == F_MHDR) && push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_IDLE;
      u     <= '0;
      k     <= '0;
    end else begin
      unique case (state)
        F_IDLE: if (u_valid[0]) state <= F_MHDR;
        F_MHDR: if (push) begin
          state <= F_IHDR;
          u     <= '0;
          k     <= '0;
        end
        F_IHDR: if (push || !in_hdr_en) state <= F_DATA;
        F_DATA: if (src_valid && src_eoi && !o_full) state <= F_ITRL;
        F_ITRL: if (push || !in_trl_en) begin
          if (last_input) begin
            state <= F_MTRL;
          end else begin
            state <= F_IHDR;
            if (k == KW'(N_IN - 1)) begin
              k <= '0;
              u <= u + 1'b1;
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        F_MTRL: if (push) state <= F_IDLE;
        default: state <= F_IDLE;
      endcase
    end
  end

  crc16 u_crc (
    .clk(clk), .rst_n(rst_n), .init(state == F_IDLE), .en(push && state != F_MTRL),
    .data(word), .crc(crc)
  );

  sync_fifo #(.WIDTH(36), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n),
    .wr_en(push), .wr_data({ctrl, word}), .full(o_full),
    .rd_en(fin_ready && !o_empty), .rd_data(o_rdata), .empty(o_empty), .count(o_cnt_unused)
  );

  assign fin_valid = !o_empty;
  assign fin_ctrl  = o_rdata[35:32];
  assign fin_data  = o_rdata[31:0];

  a_eoi_matches_input: assert property (@(posedge clk) disable iff (!rst_n)
    (state == F_DATA && src_valid && src_eoi) |-> (src_word[INPUT_W-1:0] == inp));
endmodule
