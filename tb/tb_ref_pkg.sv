// tb_ref_pkg: reference model used by the testbenches of the hit time chain.
//
// It recomputes, from the rules of the design and independently of the RTL,
// the look-up table contents the testbenches load, the choice of the maximum
// among six samples, the event class and the words that one strip produces,
// and the CRC16 of a data block.
package tb_ref_pkg;

  // Test contents of look-up table 1: a hash of the address.
  function automatic logic [8:0] lut1_val(logic [15:0] a);
    logic [31:0] h;
    h = 32'(a) * 32'd40503 + 32'd12345;
    return h[16:8];
  endfunction

  // Test contents of look-up table 2: bits 7..0 a hash, bit 8 ("not found")
  // set for about one address in eight.
  function automatic logic [8:0] lut2_val(logic [15:0] a);
    logic [31:0] h;
    h = 32'(a) * 32'h9E3779B1;
    return {h[31:29] == 3'd0, h[23:16]};
  endfunction

  // Index (1-based, 2..5) of every sample that is a maximum of its neighbours.
  function automatic int count_max(input logic [7:0] t [6], output int first_mid);
    int n;
    n = 0;
    first_mid = 0;
    for (int m = 2; m <= 5; m++) begin
      logic ok;
      if (m == 5) ok = (t[m-2] < t[m-1]) && (t[m-1] > t[m]);
      else        ok = (t[m-2] < t[m-1]) && (t[m-1] >= t[m]);
      if (ok) begin
        if (n == 0) first_mid = m;
        n++;
      end
    end
    return n;
  endfunction

  // Words that the hit time processor sends for one strip; returns the class.
  function automatic int strip_words(input logic [7:0] t [6], input logic [3:0] inp,
                                     input logic [6:0] pos, input logic [7:0] limit,
                                     ref logic [31:0] q [$]);
    int n, m, cls;
    logic [8:0] l1, l2;
    n = count_max(t, m);
    if (n == 0)             cls = 2;
    else if (n > 1)         cls = 3;
    else if (t[m-1] < limit) cls = 5;
    else begin
      l1 = lut1_val({t[m-2], t[m-1]});
      l2 = lut2_val({l1, t[m][7:1]});
      cls = l2[8] ? 4 : 1;
    end
    if (cls == 1) begin
      l1 = lut1_val({t[m-2], t[m-1]});
      l2 = lut2_val({l1, t[m][7:1]});
      q.push_back({1'b1, l2[7:4], l2[3:0], 3'(m), inp, pos, 1'b0, t[m-1]});
    end else begin
      for (int k = 0; k < 6; k++)
        q.push_back({1'b0, 4'd0, 4'(cls), 3'(k + 1), inp, pos, 1'b0, t[k]});
    end
    return cls;
  endfunction

  // Fine time bin {coarse, fine} of a class-A strip (valid only for class A).
  function automatic logic [5:0] strip_bin(input logic [7:0] t [6]);
    int m;
    logic [8:0] l1, l2;
    void'(count_max(t, m));
    l1 = lut1_val({t[m-2], t[m-1]});
    l2 = lut2_val({l1, t[m][7:1]});
    return {2'(m - 2), l2[3:0]};
  endfunction

  // CRC16, polynomial 0x1021, start 0xFFFF, MSB first, by long division on a
  // 17-bit remainder.
  function automatic logic [15:0] crc_ref(logic [31:0] words [$]);
    logic [16:0] r;
    r = 17'h0FFFF;
    foreach (words[w]) begin
      for (int b = 31; b >= 0; b--) begin
        r = {r[15:0], 1'b0};
        if (r[16] ^ words[w][b]) r = r ^ 17'h11021;
        r[16] = 1'b0;
      end
    end
    return r[15:0];
  endfunction

  // Random strip for whole-event tests: with probability occ_pct a hit of a
  // random shape (mostly a single clean maximum), otherwise noise. The hit
  // bit of a sample is set when it exceeds 40.
  function automatic void gen_strip(input int occ_pct, output logic [7:0] t [6],
                                    output logic [5:0] hb);
    int kind, m;
    for (int k = 0; k < 6; k++) t[k] = 8'($urandom % 30);
    if (int'($urandom % 100) < occ_pct) begin
      kind = $urandom % 10;
      m = 2 + $urandom % 4;
      if (kind < 6) begin                       // one maximum
        for (int k = 0; k < 6; k++) begin
          int d;
          d = (k + 1 > m) ? k + 1 - m : m - k - 1;
          t[k] = 8'(200 - 50 * d + $urandom % 10);
        end
        if (m == 5) t[5] = t[4] - 8'd3;
      end else if (kind == 6) begin              // border
        t[5] = 8'd230; t[4] = 8'd150;
      end else if (kind == 7) begin              // two maxima
        t[1] = 8'd180; t[2] = 8'd90; t[3] = 8'd170; t[4] = 8'd60;
      end else if (kind == 8) begin              // small pulse
        t[m-1] = 8'd45;
      end else begin                             // anything
        foreach (t[k]) t[k] = 8'($urandom);
        t[0] = 8'd100;
      end
    end
    for (int k = 0; k < 6; k++) hb[k] = t[k] > 8'd40;
  endfunction

endpackage
