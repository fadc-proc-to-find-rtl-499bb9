// tb_event_checker: 40 events on 16 inputs; some inputs skip an APV25
// header (missing, then wrong event number), the corrections are random.
// Checks channel event numbers, error and missing flags and the balances.
module tb_event_checker;
  localparam int NI = 16;
  logic clk = 0, rst_n = 0, check = 0;
  logic apv_header [NI];
  logic corr_valid [NI];
  logic signed [8:0] corr1 [NI];
  logic signed [6:0] corr2 [NI];
  logic [7:0] sys_event = '0;
  logic [6:0] chan_event [NI];
  logic [NI-1:0] evnum_err, missing;
  logic signed [15:0] bal1 [NI], bal2 [NI];
  logic [8:0] hdr_corr1 [NI], l1 [NI];
  logic [6:0] hdr_corr2 [NI], l2 [NI];
  int hdr_cnt [NI], b1 [NI], b2 [NI];
  bit  got [NI];
  int checks = 0, failures = 0, n_missing = 0, n_err = 0;

  event_checker #(.N_IN(NI)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hdr_cnt[i]) begin
      hdr_cnt[i] = 0; b1[i] = 0; b2[i] = 0;
      apv_header[i] = 0; corr_valid[i] = 0; corr1[i] = 0; corr2[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 1; ev <= 40; ev++) begin
      foreach (got[i]) got[i] = 0;
      // headers and corrections arrive spread over a few clocks
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        for (int i = 0; i < NI; i++) begin
          apv_header[i] = (c == i % 4) && !(i == 5 && ev % 7 == 0) && !(i == 12 && ev == 20);
          if (apv_header[i]) begin hdr_cnt[i]++; got[i] = 1; end
          corr_valid[i] = (c == 3);
          corr1[i] = 9'($urandom);
          corr2[i] = 7'($urandom);
          if (corr_valid[i]) begin
            l1[i] = corr1[i];
            l2[i] = corr2[i];
            b1[i] += (corr1[i] > 0) ? 1 : (corr1[i] < 0) ? -1 : 0;
            b2[i] += (corr2[i] > 0) ? 1 : (corr2[i] < 0) ? -1 : 0;
          end
        end
      end
      @(negedge clk);
      foreach (apv_header[i]) begin apv_header[i] = 0; corr_valid[i] = 0; end
      check = 1; sys_event = 8'(ev);
      @(negedge clk);
      check = 0;
      for (int i = 0; i < NI; i++) begin
        checks += 6;
        if (hdr_corr1[i] != l1[i] || hdr_corr2[i] != l2[i]) begin failures++; $display("FAIL hdr_corr %0d", i); end
        if (chan_event[i] != 7'(hdr_cnt[i])) begin failures++; $display("FAIL chan_event %0d", i); end
        if (evnum_err[i] != (7'(hdr_cnt[i]) != 7'(ev))) begin failures++; $display("FAIL evnum_err %0d ev %0d", i, ev); end
        if (missing[i] != !got[i]) begin failures++; $display("FAIL missing %0d ev %0d", i, ev); end
        if (bal1[i] != 16'(b1[i])) begin failures++; $display("FAIL bal1 %0d", i); end
        if (bal2[i] != 16'(b2[i])) begin failures++; $display("FAIL bal2 %0d", i); end
        n_missing += missing[i];
        n_err += evnum_err[i];
      end
    end
    checks++;
    if (n_missing == 0 || n_err == 0) begin failures++; $display("FAIL no error case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
