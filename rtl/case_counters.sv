// case_counters: statistics of the hit decision logic.
//
// One counter per event class reported by the hit time processor: hits whose
// time came from the look-up table (A), hits that do not fit the shaping
// curve (D), hits with more than one maximum (C/E), hits with the maximum on
// the border of the window (B) and small pulses (F). The ratios between the
// counters are expected to stay roughly constant, so a monitoring system reads
// them and watches for drifts. Counter width is this design's choice; the
// counters wrap. clear zeroes all of them.
// Interface: one ev_valid strobe with its ev_class per processed strip.
module case_counters
  import fadc_pkg::*;
#(
  parameter int unsigned CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          ev_valid,
  input  ev_class_t     ev_class,
  output logic [CW-1:0] n_lut,
  output logic [CW-1:0] n_nofit,
  output logic [CW-1:0] n_multimax,
  output logic [CW-1:0] n_border,
  output logic [CW-1:0] n_small
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_lut <= '0; n_nofit <= '0; n_multimax <= '0; n_border <= '0; n_small <= '0;
    end else if (clear) begin
      n_lut <= '0; n_nofit <= '0; n_multimax <= '0; n_border <= '0; n_small <= '0;
    end else if (ev_valid) begin
      unique case (ev_class)
        EV_SINGLE:   n_lut      <= n_lut + 1'b1;
        EV_NOFIT:    n_nofit    <= n_nofit + 1'b1;
        EV_MULTIMAX: n_multimax <= n_multimax + 1'b1;
        EV_BORDER:   n_border   <= n_border + 1'b1;
        EV_SMALL:    n_small    <= n_small + 1'b1;
        default: ;
      endcase
    end
  end
endmodule
