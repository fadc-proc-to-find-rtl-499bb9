// tb_fadc_top: end-to-end test of the whole module at its default size
// (16 inputs, 4 time calculators, 128 strips, 6 time samples).
//
// Loads the look-up tables, then streams four events into all 16 inputs
// back to back, so that inputs are held back while the time calculators
// scan. Events 1-3 are read out with input headers and trailers, event 4
// with both switched off. One input misses its APV25 header in event 2.
// Every data block leaving towards Finesse is compared word by word with a
// block rebuilt by the reference model (hit words, raw words and their
// markers, headers, trailers, CRC16, control bits). The receiver is busy at
// random. Counts how often each mechanism happened and fails if one never
// did: time found by the tables (A), maximum on the border (B), two maxima
// (C), shape not fitting (D), small pulse (F), input held back, receiver
// busy, blocks with and without input headers, missing input, event
// number mismatch, and the transparent capture of one input and time block
// (compared with the words that were sent).
module tb_fadc_top;
  import fadc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NU = 4, NI = 4, NT = 16, NS = 128, NEV = 4;
  logic clk = 0, rst_n = 0;
  logic adc_valid [NT];
  strip_word_t adc_data [NT];
  logic adc_ready [NT];
  logic apv_header [NT];
  logic corr_valid [NT];
  logic signed [8:0] corr1 [NT];
  logic signed [6:0] corr2 [NT];
  sample_t limit = 8'd60;
  logic in_hdr_en = 1, in_trl_en = 1;
  logic [3:0] trig_type = 4'd1;
  logic [2:0] data_type = 3'd3;
  logic [4:0] trig_time = 5'd6;
  logic [1:0] crate = 2'd2;
  logic [4:0] module_no = 5'd21;
  logic [7:0] event_number = 8'd1;
  logic lut_we = 0, lut_sel = 0;
  logic [15:0] lut_addr = '0;
  logic [8:0] lut_wdata = '0;
  logic stat_clear = 0;
  logic [31:0] n_lut [NU], n_nofit [NU], n_multimax [NU], n_border [NU], n_small [NU], n_stall [NU];
  logic [7:0] hist_addr = '0;
  logic [15:0] hist_data [NU];
  logic [6:0] chan_event [NT];
  logic [NT-1:0] evnum_err, missing;
  logic signed [15:0] bal1 [NT], bal2 [NT];
  logic spy_en = 1, spy_ack = 0, spy_full;
  logic [3:0] spy_sel_input = 4'd9;
  logic [2:0] spy_sel_tb = 3'd3;
  logic [6:0] spy_rd_addr = '0;
  logic [31:0] spy_rd_data;
  logic fin_valid, fin_ready = 0;
  logic [31:0] fin_data;
  ctrl_t fin_ctrl;

  fadc_top dut (.*);
  always #5 clk = ~clk;

  strip_word_t src [NT][$];
  strip_word_t ev_src [NEV+1][NT][$];
  logic [31:0] hits [NEV+1][NT][$];   // expected hit words per event and input
  logic [8:0]  ev_corr1 [NEV+1][NT];
  logic [6:0]  ev_corr2 [NEV+1][NT];
  logic [35:0] exp_q [$];
  int cls_cnt [6];
  int checks = 0, failures = 0, n_busy = 0, n_hdr_blocks = 0, n_nohdr_blocks = 0;
  int n_missing = 0, n_err = 0, blocks_done = 0, starts = 0;
  bit go = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: blocks done %0d", blocks_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input streams
  for (genvar n = 0; n < NT; n++) begin : g_drv
    always @(negedge clk) begin
      adc_valid[n] <= go && src[n].size() > 0 && ($urandom % 10 != 0);
      adc_data[n]  <= (src[n].size() > 0) ? src[n][0] : '0;
    end
    always @(posedge clk) if (adc_valid[n] && adc_ready[n]) void'(src[n].pop_front());
  end

  always @(negedge clk) fin_ready <= ($urandom % 6 != 0);
  always @(posedge clk) if (fin_valid && !fin_ready) n_busy++;

  // output comparison
  always @(posedge clk) begin
    if (rst_n && fin_valid && fin_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra word %h", fin_data); end
      else begin
        logic [35:0] e;
        e = exp_q.pop_front();
        if ({fin_ctrl, fin_data} !== e) begin
          failures++;
          if (failures < 10) $display("FAIL got %h %h exp %h", fin_ctrl, fin_data, e);
        end
        if (fin_ctrl == CTRL_MAIN_TRAILER) blocks_done++;
      end
    end
  end

  // APV25 headers and corrections of event e; input 6 misses event 2
  task automatic send_headers(int e);
    @(negedge clk);
    for (int n = 0; n < NT; n++) begin
      apv_header[n] = !(n == 6 && e == 2);
      corr_valid[n] = 1;
      corr1[n] = ev_corr1[e][n];
      corr2[n] = ev_corr2[e][n];
    end
    @(negedge clk);
    foreach (apv_header[n]) begin apv_header[n] = 0; corr_valid[n] = 0; end
  endtask

  // expected block of event e, given the header counts at its check
  task automatic expect_block(int e, bit hdr, bit trl, int cnt [NT], bit seen [NT]);
    logic [31:0] words [$];
    logic [15:0] mask;
    words.delete();
    mask = '0;
    words.push_back({1'b0, trig_type, 1'b0, data_type, 2'b00, trig_time, crate, module_no, 1'b0, 8'(e)});
    exp_q.push_back({CTRL_MAIN_HEADER, words[words.size()-1]});
    for (int n = 0; n < NT; n++) begin
      logic err, mis;
      err = 7'(cnt[n]) != 7'(e);
      mis = !seen[n];
      mask[n] = err | mis;
      n_err += err;
      n_missing += mis;
      if (hdr) begin
        words.push_back({1'b1, 1'b0, 7'(cnt[n]), 3'b000, 4'(n), ev_corr2[e][n], ev_corr1[e][n]});
        exp_q.push_back({CTRL_INPUT_HEADER, words[words.size()-1]});
      end
      foreach (hits[e][n][k]) begin
        words.push_back(hits[e][n][k]);
        exp_q.push_back({CTRL_DATA, hits[e][n][k]});
      end
      if (trl) begin
        words.push_back({1'b1, 11'd0, 4'(n), 14'd0, mis, err});
        exp_q.push_back({CTRL_INPUT_TRAILER, words[words.size()-1]});
      end
    end
    exp_q.push_back({CTRL_MAIN_TRAILER, crc_ref(words), mask});
  endtask

  initial begin
    int cnt [NT];
    bit seen [NT];
    foreach (cls_cnt[k]) cls_cnt[k] = 0;
    foreach (adc_valid[n]) begin
      adc_valid[n] = 0; adc_data[n] = '0; apv_header[n] = 0; corr_valid[n] = 0;
      corr1[n] = 0; corr2[n] = 0; cnt[n] = 0; seen[n] = 0;
    end
    // build the events
    for (int e = 1; e <= NEV; e++) begin
      logic [7:0] t [NT][NS][6];
      logic [5:0] hb [NT][NS];
      for (int n = 0; n < NT; n++) begin
        ev_corr1[e][n] = 9'($urandom);
        ev_corr2[e][n] = 7'($urandom);
        for (int s = 0; s < NS; s++) gen_strip(20, t[n][s], hb[n][s]);
        for (int b = 0; b < 6; b++)
          for (int s = 0; s < NS; s++) ev_src[e][n].push_back({hb[n][s][b], t[n][s][b]});
        for (int s = 0; s < NS; s++)
          if (hb[n][s] != 0) begin
            logic [31:0] w [$];
            w.delete();
            cls_cnt[strip_words(t[n][s], 4'(n), 7'(s), limit, w)]++;
            foreach (w[k]) hits[e][n].push_back(w[k]);
          end
      end
    end
    // reset, then load the look-up tables
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 65536; k++) begin
        @(negedge clk);
        lut_we = 1; lut_sel = s[0]; lut_addr = 16'(k);
        lut_wdata = s ? lut2_val(16'(k)) : lut1_val(16'(k));
      end
    @(negedge clk);
    lut_we = 0;
    // headers of event 1, then the data of all events
    send_headers(1);
    foreach (cnt[n]) begin cnt[n]++; seen[n] = 1; end
    for (int e = 1; e < NEV; e++)
      for (int n = 0; n < NT; n++) foreach (ev_src[e][n][k]) src[n].push_back(ev_src[e][n][k]);
    go = 1;
    for (int e = 1; e <= NEV; e++) begin
      bit hdr;
      hdr = (e < NEV);
      if (e == NEV) begin
        // switch input headers and trailers off between blocks
        wait (exp_q.size() == 0);
        @(negedge clk);
        in_hdr_en = 0; in_trl_en = 0;
        for (int n = 0; n < NT; n++) foreach (ev_src[e][n][k]) src[n].push_back(ev_src[e][n][k]);
      end
      event_number = 8'(e);
      @(posedge clk iff dut.blk_start);
      starts++;
      expect_block(e, hdr, hdr, cnt, seen);
      if (hdr) n_hdr_blocks++; else n_nohdr_blocks++;
      foreach (seen[n]) seen[n] = 0;
      if (e < NEV) begin
        send_headers(e + 1);
        foreach (cnt[n]) if (!(n == 6 && e + 1 == 2)) begin cnt[n]++; seen[n] = 1; end
      end
    end
    wait (exp_q.size() == 0 && blocks_done == NEV);
    repeat (10) @(negedge clk);
    // statistics against the model
    begin
      int sum [6];
      int stall;
      foreach (sum[k]) sum[k] = 0;
      stall = 0;
      for (int u = 0; u < NU; u++) begin
        sum[1] += n_lut[u]; sum[2] += n_border[u]; sum[3] += n_multimax[u];
        sum[4] += n_nofit[u]; sum[5] += n_small[u]; stall += n_stall[u];
      end
      for (int k = 1; k <= 5; k++) begin
        checks++;
        if (sum[k] != cls_cnt[k]) begin failures++; $display("FAIL class %0d counter %0d model %0d", k, sum[k], cls_cnt[k]); end
        checks++;
        if (cls_cnt[k] == 0) begin failures++; $display("FAIL class %0d never happened", k); end
      end
      checks++;
      if (stall == 0) begin failures++; $display("FAIL inputs never held back"); end
      $display("mechanisms: A=%0d B=%0d C=%0d D=%0d F=%0d input-stall-clocks=%0d busy-clocks=%0d",
               cls_cnt[1], cls_cnt[2], cls_cnt[3], cls_cnt[4], cls_cnt[5], stall, n_busy);
    end
    // transparent data: event 1 is the first of every 256, input 9, time block 3
    checks++;
    if (!spy_full) begin failures++; $display("FAIL no transparent capture"); end
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      spy_rd_addr = 7'(k);
      @(negedge clk);
      checks++;
      if (spy_rd_data !== {9'd0, 3'd3, 4'd9, 7'(k), ev_src[1][9][2 * NS + k]}) begin
        failures++;
        if (failures < 10) $display("FAIL transparent strip %0d got %h", k, spy_rd_data);
      end
    end
    $display("transparent capture: input 9 time block 3, %0d words compared", NS);
    checks++;
    if (n_busy == 0) begin failures++; $display("FAIL receiver never busy"); end
    checks++;
    if (n_hdr_blocks == 0 || n_nohdr_blocks == 0) begin failures++; $display("FAIL header mode not switched"); end
    checks++;
    if (n_missing == 0 || n_err == 0) begin failures++; $display("FAIL no missing input / event number error"); end
    checks++;
    if (blocks_done != NEV || starts != NEV) begin failures++; $display("FAIL blocks %0d", blocks_done); end
    $display("blocks=%0d with-headers=%0d without=%0d missing=%0d evnum-errors=%0d sim-clocks=%0d",
             blocks_done, n_hdr_blocks, n_nohdr_blocks, n_missing, n_err, $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
