// tb_time_calc_unit: sends three events of 4 inputs x 6 time blocks x 128
// strips (about 20 % of the strips hit) into one time calculator, with the
// inputs and the output stalled at random, and compares the output stream
// (hit words, raw words, end-of-input markers) with the reference model.
// Counts that the inputs were held back (FIFO full) and that every event
// class occurred, and checks the case counters and one histogram bin.
module tb_time_calc_unit;
  import fadc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NI = 4, NS = 128, NEV = 3;
  logic clk = 0, rst_n = 0;
  logic [3:0] input_base = 4'd4;
  sample_t limit = 8'd60;
  logic in_valid [NI];
  strip_word_t in_data [NI];
  logic in_ready [NI];
  logic out_valid, out_eoi, out_ready = 0;
  logic [31:0] out_word;
  logic lut_we = 0, lut_sel = 0;
  logic [15:0] lut_addr = '0;
  logic [8:0] lut_wdata = '0;
  logic stat_clear = 0;
  logic [31:0] n_lut, n_nofit, n_multimax, n_border, n_small, n_stall;
  logic [7:0] hist_addr = '0;
  logic [15:0] hist_data;
  logic scanning;
  strip_word_t src [NI][$];
  logic [32:0] exp_q [$];
  int cls_cnt [6];
  int hist_model [256];
  int checks = 0, failures = 0;
  bit go = 0;

  time_calc_unit #(.N_IN(NI), .N_STRIPS(NS), .IN_FIFO_DEPTH(128), .OUT_FIFO_DEPTH(16384)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input drivers
  for (genvar i = 0; i < NI; i++) begin : g_drv
    always @(negedge clk) begin
      in_valid[i] <= go && src[i].size() > 0 && ($urandom % 8 != 0);
      in_data[i]  <= (src[i].size() > 0) ? src[i][0] : '0;
    end
    always @(posedge clk) if (in_valid[i] && in_ready[i]) void'(src[i].pop_front());
  end

  always @(negedge clk) out_ready <= ($urandom % 3 != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      logic [32:0] e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra word %h", out_word); end
      else begin
        e = exp_q.pop_front();
        if ({out_eoi, out_word} !== e) begin failures++; $display("FAIL got %b %h exp %h at check %0d t=%0t", out_eoi, out_word, e, checks, $time); end
      end
    end
  end

  initial begin
    foreach (cls_cnt[k]) cls_cnt[k] = 0;
    foreach (hist_model[k]) hist_model[k] = 0;
    foreach (in_valid[i]) begin in_valid[i] = 0; in_data[i] = '0; end
    // build events and the expected stream
    for (int ev = 0; ev < NEV; ev++) begin
      logic [7:0] t [NI][NS][6];
      logic [5:0] hb [NI][NS];
      for (int i = 0; i < NI; i++)
        for (int s = 0; s < NS; s++) gen_strip(20, t[i][s], hb[i][s]);
      for (int i = 0; i < NI; i++)
        for (int b = 0; b < 6; b++)
          for (int s = 0; s < NS; s++) src[i].push_back({hb[i][s][b], t[i][s][b]});
      for (int i = 0; i < NI; i++) begin
        for (int s = 0; s < NS; s++) begin
          if (hb[i][s] != 0) begin
            logic [31:0] w [$];
            int c;
            w.delete();
            c = strip_words(t[i][s], input_base + 4'(i), 7'(s), limit, w);
            cls_cnt[c]++;
            if (c == 1) hist_model[{2'(i), strip_bin(t[i][s])}]++;
            foreach (w[k]) exp_q.push_back({1'b0, w[k]});
          end
        end
        exp_q.push_back({1'b1, 28'd0, input_base + 4'(i)});
      end
    end
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 65536; k++) begin
        @(negedge clk);
        lut_we = 1; lut_sel = s[0]; lut_addr = 16'(k);
        lut_wdata = s ? lut2_val(16'(k)) : lut1_val(16'(k));
      end
    @(negedge clk);
    lut_we = 0;
    rst_n = 1;
    @(negedge clk);
    go = 1;
    wait (exp_q.size() == 0);
    repeat (20) @(negedge clk);
    checks++;
    if (n_lut != cls_cnt[1] || n_border != cls_cnt[2] || n_multimax != cls_cnt[3] ||
        n_nofit != cls_cnt[4] || n_small != cls_cnt[5]) begin
      failures++; $display("FAIL case counters");
    end
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (cls_cnt[k] == 0) begin failures++; $display("FAIL class %0d never occurred", k); end
    end
    for (int a = 0; a < 256; a++) begin
      hist_addr = 8'(a);
      #1;
      checks++;
      if (hist_data != 16'(hist_model[a])) begin failures++; $display("FAIL hist %0d", a); end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL inputs never held back"); end
    checks++;
    if (scanning) begin failures++; $display("FAIL unit did not return to write phase"); end
    $display("classes A=%0d B=%0d C=%0d D=%0d F=%0d stall clocks=%0d", cls_cnt[1], cls_cnt[2],
             cls_cnt[3], cls_cnt[4], cls_cnt[5], n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
