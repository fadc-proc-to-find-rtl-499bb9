// tb_transparent_spy: self-checking test of the transparent-data capture.
//
// Four inputs stream random 9-bit strip words, event after event (6 time
// blocks x 128 strips), each with its own random gaps. The test repeatedly
// selects an input and a time block (now and then an out-of-range one, which
// must fall back to block 1), enables the capture, waits for spy_full, lets
// more events pass to show the memory is held, reads all 128 words and
// compares them with the words of the event that should have been taken:
// the first event of that input starting after the capture was enabled
// whose number is a multiple of the prescale (4 here instead of 256, to keep
// the run short). Events are tracked by the testbench from its own word
// counts. It also checks that nothing is captured while the capture is
// disabled and that spy_ack frees the memory.
module tb_transparent_spy;
  import fadc_pkg::*;
  localparam int NT = 4, NS = 128, P = 4, NEV = 48, EW = 6 * NS;
  logic clk = 0, rst_n = 0;
  logic in_fire [NT];
  strip_word_t in_data [NT];
  logic spy_en = 0, spy_ack = 0, spy_full, capturing;
  logic [1:0] sel_input = '0, spy_input;
  logic [2:0] sel_tb = 3'd1, spy_tb;
  logic [6:0] rd_addr = '0;
  logic [31:0] rd_data;
  int checks = 0, failures = 0, captures = 0;
  longint cyc = 0;

  transparent_spy #(.N_TOT(NT), .N_STRIPS(NS), .PRESCALE(P)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  strip_word_t stream [NT][NEV * EW];
  int idx [NT];
  longint ev_start [NT][NEV];   // cycle in which event e of input n began

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 0; n < NT; n++) begin : g_drv
    always @(negedge clk) begin
      in_fire[n] <= rst_n && idx[n] < NEV * EW && ($urandom % 3 != 0);
      in_data[n] <= (idx[n] < NEV * EW) ? stream[n][idx[n]] : '0;
    end
    always @(posedge clk) if (in_fire[n]) begin
      if (idx[n] % EW == 0) ev_start[n][idx[n] / EW] = cyc;
      idx[n]++;
    end
  end

  initial begin
    foreach (idx[n]) begin
      idx[n] = 0;
      in_fire[n] = 0;
      in_data[n] = '0;
      for (int k = 0; k < NEV * EW; k++) stream[n][k] = 9'($urandom);
      for (int e = 0; e < NEV; e++) ev_start[n][e] = -1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // disabled: nothing may be captured
    repeat (3000) begin
      @(negedge clk);
      checks++;
      if (capturing || spy_full) begin failures++; $display("FAIL capture while disabled"); end
    end
    while (1) begin
      int n, tb0, e_exp;
      longint armed;
      n = $urandom % NT;
      case ($urandom % 8)
        0: sel_tb = 3'd0;
        7: sel_tb = 3'd7;
        default: sel_tb = 3'(1 + $urandom % 6);
      endcase
      tb0 = (sel_tb >= 1 && sel_tb <= 6) ? sel_tb - 1 : 0;
      sel_input = 2'(n);
      // the event that must be taken: first multiple of P starting after arming
      e_exp = (idx[n] + EW - 1) / EW;
      while (e_exp % P != 0) e_exp++;
      if (e_exp >= NEV) break;
      spy_en = 1;
      armed = cyc;
      @(posedge clk iff spy_full);
      @(negedge clk);
      spy_en = 0;
      repeat ($urandom % 3000) @(negedge clk);   // later events must not overwrite it
      captures++;
      checks++;
      if (ev_start[n][e_exp] <= armed) begin
        failures++; $display("FAIL event %0d of input %0d started at %0d before arming %0d", e_exp, n, ev_start[n][e_exp], armed);
      end
      checks++;
      if (spy_input != 2'(n) || spy_tb != 3'(tb0 + 1)) begin
        failures++; $display("FAIL selection reported %0d/%0d, exp %0d/%0d", spy_input, spy_tb, n, tb0 + 1);
      end
      for (int s = 0; s < NS; s++) begin
        logic [31:0] exp_w;
        rd_addr = 7'(s);
        @(negedge clk);
        exp_w = {9'd0, 3'(tb0 + 1), 4'(n), 7'(s), stream[n][e_exp * EW + tb0 * NS + s]};
        checks++;
        if (rd_data !== exp_w) begin
          failures++;
          if (failures < 10) $display("FAIL in %0d ev %0d tb %0d strip %0d got %h exp %h", n, e_exp, tb0 + 1, s, rd_data, exp_w);
        end
      end
      spy_ack = 1;
      @(negedge clk);
      spy_ack = 0;
      checks++;
      if (spy_full) begin failures++; $display("FAIL spy_full not cleared by ack"); end
    end
    checks++;
    if (captures < 4) begin failures++; $display("FAIL only %0d captures", captures); end
    $display("captures=%0d", captures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
