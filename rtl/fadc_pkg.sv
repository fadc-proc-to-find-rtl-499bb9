// fadc_pkg: types and constants shared by the hit-time processing chain of
// the FADC+processor readout module.
//
// A strip sample is 8 bit of pulse height plus a hit bit (set by the per-input
// hit processor when the sample is above threshold). Six time samples, 25 ns
// apart, are taken per trigger. The 32-bit output word layouts follow the
// module's data format table; the 4 control bits that travel with every word
// on the board bus and on the Finesse link are HEADER, TRAILER, HALF_EV (stop)
// and DA_EN, in that order from bit 3 to bit 0.
//
// Choices of this design (not fixed by the data format description): the
// numeric codes of the event classes, carried in bits 26-23 of raw words, and
// the split of the second look-up table's 9-bit output.
package fadc_pkg;

  localparam int unsigned N_TB      = 6;    // time samples per trigger
  localparam int unsigned SAMPLE_W  = 8;    // pulse height bits per sample
  localparam int unsigned STRIP_W   = 7;    // strip position within one APV25 (128 strips)
  localparam int unsigned INPUT_W   = 4;    // input number on the module (16 inputs)

  typedef logic [SAMPLE_W-1:0] sample_t;

  // One word from the hit processor: pulse height and hit bit ("8 bit + 1").
  typedef struct packed {
    logic    hit;
    sample_t height;
  } strip_word_t;

  // Event classes of the hit time processor (types A to F of the decision logic).
  typedef enum logic [3:0] {
    EV_NONE     = 4'd0,
    EV_SINGLE   = 4'd1,  // A: one maximum, time from the look-up table
    EV_BORDER   = 4'd2,  // B: maximum at the border of the 6-sample window
    EV_MULTIMAX = 4'd3,  // C/E: more than one maximum
    EV_NOFIT    = 4'd4,  // D: look-up table reports that the shape does not fit
    EV_SMALL    = 4'd5   // F: maximum below the amplitude limit
  } ev_class_t;

  // Control bits that accompany each 32-bit word.
  typedef struct packed {
    logic header;   // bit 67 / HEADER
    logic trailer;  // bit 66 / TRAILER
    logic stop;     // bit 65 / HALF_EV
    logic da_en;    // bit 64 / DA_EN
  } ctrl_t;

  localparam ctrl_t CTRL_MAIN_HEADER  = '{header:1'b1, trailer:1'b0, stop:1'b0, da_en:1'b1};
  localparam ctrl_t CTRL_INPUT_HEADER = '{header:1'b1, trailer:1'b0, stop:1'b0, da_en:1'b1};
  localparam ctrl_t CTRL_DATA         = '{header:1'b0, trailer:1'b0, stop:1'b0, da_en:1'b1};
  localparam ctrl_t CTRL_DUMMY        = '{header:1'b1, trailer:1'b1, stop:1'b0, da_en:1'b0};
  localparam ctrl_t CTRL_INPUT_TRAILER= '{header:1'b0, trailer:1'b1, stop:1'b0, da_en:1'b0};
  localparam ctrl_t CTRL_MAIN_TRAILER = '{header:1'b0, trailer:1'b1, stop:1'b0, da_en:1'b1};

  // Hit word with time: bit 31 = 1, 30-27 quality, 26-23 fine time,
  // 22-20 index of the maximum sample (2..5), 19-16 input, 15-9 position,
  // 8-0 pulse height.
  function automatic logic [31:0] hit_time_word(logic [3:0] quality, logic [3:0] fine,
                                                 logic [2:0] tmax, logic [INPUT_W-1:0] inp,
                                                 logic [STRIP_W-1:0] pos, sample_t height);
    return {1'b1, quality, fine, tmax, inp, pos, 1'b0, height};
  endfunction

  // Hit word without time (one per time block): bit 31 = 0, 30-27 zero,
  // 26-23 event class, 22-20 time block 1..6, 19-16 input, 15-9 position,
  // 8-0 pulse height.
  function automatic logic [31:0] raw_word(ev_class_t cls, logic [2:0] tblock,
                                           logic [INPUT_W-1:0] inp,
                                           logic [STRIP_W-1:0] pos, sample_t height);
    return {1'b0, 4'd0, cls, tblock, inp, pos, 1'b0, height};
  endfunction

endpackage
