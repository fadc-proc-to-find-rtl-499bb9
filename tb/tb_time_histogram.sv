// tb_time_histogram: random hits into 4 inputs x 64 bins, every bin read back
// and compared; then clear.
module tb_time_histogram;
  logic clk = 0, rst_n = 0, clear = 0, hit_valid = 0;
  logic [1:0] hit_input = '0;
  logic [5:0] hit_bin = '0;
  logic [7:0] rd_addr = '0;
  logic [15:0] rd_data;
  int model [256];
  int checks = 0, failures = 0;

  time_histogram #(.N_IN(4), .BINS(64), .HW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[k]) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      hit_valid = $urandom % 2;
      hit_input = 2'($urandom);
      hit_bin   = 6'($urandom % 16 + 20);     // a peak region
      if (hit_valid) model[{hit_input, hit_bin}]++;
    end
    @(negedge clk);
    hit_valid = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      rd_addr = 8'(k);
      #1;
      checks++;
      if (rd_data != 16'(model[k])) begin failures++; $display("FAIL bin %0d: %0d vs %0d", k, rd_data, model[k]); end
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0; rd_addr = 8'd90;
    #1; checks++;
    if (rd_data != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
