// tb_time_lut: loads both tables with the reference contents and reads them
// through the two-stage pipeline, checking the value and the latency of two
// enabled clocks, and that the pipeline holds while en is low.
module tb_time_lut;
  import tb_ref_pkg::*;
  logic clk = 0, en = 0, we = 0, we_sel = 0;
  logic [15:0] rd_addr1 = '0, waddr = '0;
  logic [6:0]  rd_third = '0;
  logic [8:0]  q1, q, wdata = '0;
  int checks = 0, failures = 0;

  time_lut #(.AW(16), .DW(9)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a [$];
    logic [6:0]  th [$];
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 65536; k++) begin
        @(negedge clk);
        we = 1; we_sel = s[0]; waddr = 16'(k);
        wdata = s ? lut2_val(16'(k)) : lut1_val(16'(k));
      end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      rd_addr1 = 16'($urandom);
      rd_third = 7'($urandom);
      if (en) begin
        a.push_back(rd_addr1);
        th.push_back(rd_third);
      end
      @(posedge clk);
      #1;
      if (en && a.size() == 2) begin
        logic [8:0] exp1;
        exp1 = lut1_val(a[0]);
        checks++;
        if (q != lut2_val({exp1, th[0]})) begin
          failures++; $display("FAIL q addr=%h third=%h q=%h", a[0], th[0], q);
        end
        void'(a.pop_front());
        void'(th.pop_front());
      end
      if (en && a.size() >= 1) begin
        checks++;
        if (q1 != lut1_val(a[a.size()-1])) begin failures++; $display("FAIL q1"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
