// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, full, empty and count, at a depth of 16.
module tb_sync_fifo;
  localparam int W = 9, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(empty && !full && count == 0, "empty after reset");
    for (int c = 0; c < 4000; c++) begin
      // phase-dependent bias so that full and empty both occur
      int bias = ((c / 300) % 2 == 0) ? 75 : 25;
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == D), "full flag");
      chk(count == model.size(), "count");
      if (!empty) chk(rd_data == model[0], "head data");
      wr_en   = (($urandom % 100) < bias) && !full;
      wr_data = W'($urandom);
      rd_en   = (($urandom % 100) >= bias) && !empty;
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
