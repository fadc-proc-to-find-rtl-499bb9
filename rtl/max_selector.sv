// max_selector: finds, among six time samples T1..T6 of one strip, the three
// neighbours whose middle sample is a maximum.
//
// Candidate middle samples are T2..T5. Following the ranges of the coarse
// time: the middle sample Tm is a maximum when T(m-1) < Tm and Tm >= T(m+1);
// for the last candidate T5 the right-hand comparison is strict (T5 > T6),
// because T5 = T6 puts the peak outside the 100 ns window. The chosen middle
// index gives the coarse time 0, 25, 50 or 75 ns (coarse = m - 2). When more
// than one candidate qualifies (two maxima), the first one is reported and
// n_max tells how many there are; when none qualifies the maximum lies on the
// border of the window (T1 or T6).
//
// Purely combinational. Outputs: found (exactly or more than one maximum),
// n_max (0..4), coarse (2 bit), mid (index 2..5 of the middle sample,
// 1-based), the three selected samples left/centre/right and peak (= centre).
module max_selector
  import fadc_pkg::*;
(
  input  sample_t    t [N_TB],      // t[0] = T1 ... t[5] = T6
  output logic       found,
  output logic [2:0] n_max,
  output logic [1:0] coarse,
  output logic [2:0] mid,
  output sample_t    s_left,
  output sample_t    s_centre,
  output sample_t    s_right
);
  logic [3:0] is_max;   // is_max[k] : T(k+2) is a maximum, k = 0..3

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (k == 3) is_max[k] = (t[k] < t[k+1]) && (t[k+1] >  t[k+2]);
      else        is_max[k] = (t[k] < t[k+1]) && (t[k+1] >= t[k+2]);
    end
    n_max  = 3'(is_max[0]) + 3'(is_max[1]) + 3'(is_max[2]) + 3'(is_max[3]);
    found  = |is_max;
    coarse = 2'd0;
    for (int k = 3; k >= 0; k--) begin
      if (is_max[k]) coarse = 2'(k);
    end
    mid      = 3'(coarse) + 3'd2;
    s_left   = t[3'(coarse)];
    s_centre = t[3'(coarse) + 3'd1];
    s_right  = t[3'(coarse) + 3'd2];
  end
endmodule
