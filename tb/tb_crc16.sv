// tb_crc16: random blocks of words, CRC compared with a long-division
// reference.
module tb_crc16;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [31:0] data = '0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] blk [$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      blk.delete();
      @(negedge clk); init = 1; en = 0;
      @(negedge clk); init = 0;
      for (int w = 0; w < int'($urandom % 40) + 1; w++) begin
        en = $urandom % 3 != 0;
        data = $urandom;
        if (en) blk.push_back(data);
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (crc != crc_ref(blk)) begin failures++; $display("FAIL crc %h ref %h", crc, crc_ref(blk)); end
    end
    // empty block
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    checks++;
    if (crc != 16'hFFFF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
