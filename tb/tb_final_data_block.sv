// tb_final_data_block: feeds 4 unit streams with random hit words and
// end-of-input markers for several blocks, with input headers and trailers
// switched on and off, random source gaps and a random busy from the
// receiver. Rebuilds every expected block (headers, words, trailers, CRC16,
// control bits) and compares word by word.
module tb_final_data_block;
  import fadc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NU = 4, NI = 4, NT = 16;
  logic clk = 0, rst_n = 0, in_hdr_en = 1, in_trl_en = 1;
  logic [3:0] trig_type = 4'd3;
  logic [2:0] data_type = 3'd2;
  logic [4:0] trig_time = 5'd17;
  logic [1:0] crate = 2'd1;
  logic [4:0] module_no = 5'd9;
  logic [7:0] event_number = 8'd0;
  logic [6:0] chan_event [NT];
  logic [8:0] corr1 [NT];
  logic [6:0] corr2 [NT];
  logic [NT-1:0] evnum_err = '0, missing = '0;
  logic u_valid [NU], u_eoi [NU], u_ready [NU];
  logic [31:0] u_word [NU];
  logic start, fin_valid, fin_ready = 0;
  logic [31:0] fin_data;
  ctrl_t fin_ctrl;
  logic [32:0] src [NU][$];
  logic [35:0] exp_q [$];
  int checks = 0, failures = 0, n_start = 0;

  final_data_block #(.N_UNITS(NU), .N_IN(NI), .FIFO_DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar u = 0; u < NU; u++) begin : g_src
    always @(negedge clk) begin
      u_valid[u] <= src[u].size() > 0 && ($urandom % 4 != 0);
      u_eoi[u]   <= (src[u].size() > 0) ? src[u][0][32] : 1'b0;
      u_word[u]  <= (src[u].size() > 0) ? src[u][0][31:0] : '0;
    end
    always @(posedge clk) if (u_valid[u] && u_ready[u]) void'(src[u].pop_front());
  end

  always @(negedge clk) fin_ready <= ($urandom % 5 != 0);
  always @(posedge clk) if (start) n_start++;

  always @(posedge clk) begin
    if (rst_n && fin_valid && fin_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra word"); end
      else begin
        logic [35:0] e;
        e = exp_q.pop_front();
        if ({fin_ctrl, fin_data} !== e) begin failures++; $display("FAIL got %h %h exp %h", fin_ctrl, fin_data, e); end
      end
    end
  end

  initial begin
    foreach (u_valid[u]) begin u_valid[u] = 0; u_eoi[u] = 0; u_word[u] = '0; end
    for (int n = 0; n < NT; n++) begin
      chan_event[n] = 7'($urandom); corr1[n] = 9'($urandom); corr2[n] = 7'($urandom);
    end
    evnum_err = 16'h0021; missing = 16'h0400;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      logic [31:0] words [$];
      words.delete();
      in_hdr_en = blk % 3 != 1;
      in_trl_en = blk % 3 != 2;
      event_number = 8'(blk + 1);
      words.push_back({1'b0, trig_type, 1'b0, data_type, 2'b00, trig_time, crate, module_no, 1'b0, event_number});
      exp_q.push_back({CTRL_MAIN_HEADER, words[words.size()-1]});
      for (int u = 0; u < NU; u++)
        for (int k = 0; k < NI; k++) begin
          int n, nw;
          n = u * NI + k;
          if (in_hdr_en) begin
            words.push_back({1'b1, 1'b0, chan_event[n], 3'b000, 4'(n), corr2[n], corr1[n]});
            exp_q.push_back({CTRL_INPUT_HEADER, words[words.size()-1]});
          end
          nw = $urandom % 6;
          for (int w = 0; w < nw; w++) begin
            logic [31:0] hw;
            hw = {1'b1, 11'($urandom), 4'(n), 16'($urandom)};
            src[u].push_back({1'b0, hw});
            words.push_back(hw);
            exp_q.push_back({CTRL_DATA, hw});
          end
          src[u].push_back({1'b1, 28'd0, 4'(n)});
          if (in_trl_en) begin
            words.push_back({1'b1, 11'd0, 4'(n), 14'd0, missing[n], evnum_err[n]});
            exp_q.push_back({CTRL_INPUT_TRAILER, words[words.size()-1]});
          end
        end
      exp_q.push_back({CTRL_MAIN_TRAILER, crc_ref(words), evnum_err | missing});
      wait (exp_q.size() == 0);
      repeat (3) @(negedge clk);
    end
    checks++;
    if (n_start != 6) begin failures++; $display("FAIL start pulses %0d", n_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
