// tb_case_counters: random class strobes against per-class counts, and clear.
module tb_case_counters;
  import fadc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, ev_valid = 0;
  ev_class_t ev_class = EV_NONE;
  logic [31:0] n_lut, n_nofit, n_multimax, n_border, n_small;
  int cnt [6];
  int checks = 0, failures = 0;

  case_counters #(.CW(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (n_lut != cnt[1] || n_border != cnt[2] || n_multimax != cnt[3] ||
        n_nofit != cnt[4] || n_small != cnt[5]) begin
      failures++; $display("FAIL counts %0d %0d %0d %0d %0d", n_lut, n_border, n_multimax, n_nofit, n_small);
    end
  endtask

  initial begin
    foreach (cnt[k]) cnt[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      ev_valid = $urandom % 2;
      ev_class = ev_class_t'($urandom % 6);
      clear = (i == 2500);
      if (clear) foreach (cnt[k]) cnt[k] = 0;
      else if (ev_valid) cnt[ev_class]++;
      @(posedge clk);
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
