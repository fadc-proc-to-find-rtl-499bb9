// tb_hit_time_processor: loads both look-up tables, sends random strips of
// every class with random input and output stalls, and compares the word
// stream and the class strobes with the reference model. Also checks the
// throughput of one class-A strip per clock and the 6-clock raw output.
module tb_hit_time_processor;
  import fadc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t limit = 8'd20;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  sample_t in_t [N_TB];
  logic [3:0] in_input = '0;
  logic [6:0] in_pos = '0;
  logic [31:0] out_word;
  logic ev_valid, idle;
  ev_class_t ev_class;
  logic [1:0] hit_coarse;
  logic [3:0] hit_fine;
  logic lut_we = 0, lut_sel = 0;
  logic [15:0] lut_addr = '0;
  logic [8:0] lut_wdata = '0;
  logic [31:0] exp_q [$];
  int exp_cls [$];
  int seen [6];
  int checks = 0, failures = 0;
  bit random_ready = 1;

  hit_time_processor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // make a strip of a wanted shape
  task automatic make_strip(int kind);
    int m;
    m = 2 + $urandom % 4;
    for (int k = 0; k < 6; k++) in_t[k] = sample_t'(10 + $urandom % 20);
    case (kind)
      0: begin  // single maximum, large
        for (int k = 0; k < 6; k++) in_t[k] = sample_t'(30 + 25 * (6 - ((k+1 > m) ? k+1-m : m-k-1)) + $urandom % 10);
        in_t[m-1] = 8'd220 + 8'($urandom % 30);
        if (m == 5) in_t[5] = in_t[4] - 8'd1 - 8'($urandom % 20);
      end
      1: begin in_t[0] = 8'd250; end                                       // border (left)
      2: begin in_t[1] = 8'd200; in_t[2] = 8'd100; in_t[3] = 8'd180; in_t[4] = 8'd90; end // two maxima
      3: begin foreach (in_t[k]) in_t[k] = sample_t'($urandom % 5); in_t[2] = 8'd12; end // small
      default: foreach (in_t[k]) in_t[k] = sample_t'($urandom);
    endcase
  endtask

  // output side: random ready, compare words
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected word %h", out_word); end
      else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        if (out_word !== e) begin failures++; $display("FAIL word %h exp %h", out_word, e); end
      end
    end
    if (rst_n && ev_valid) begin
      checks++;
      if (exp_cls.size() == 0 || int'(ev_class) != exp_cls[0]) begin
        failures++; $display("FAIL class %0d", ev_class);
      end else begin
        seen[exp_cls[0]]++;
        void'(exp_cls.pop_front());
      end
    end
  end

  always @(negedge clk) out_ready <= random_ready ? ($urandom % 4 != 0) : 1'b1;

  initial begin
    foreach (seen[k]) seen[k] = 0;
    foreach (in_t[k]) in_t[k] = '0;
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 65536; k++) begin
        @(negedge clk);
        lut_we = 1; lut_sel = s[0]; lut_addr = 16'(k);
        lut_wdata = s ? lut2_val(16'(k)) : lut1_val(16'(k));
      end
    @(negedge clk);
    lut_we = 0;
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = $urandom % 3 != 0;
      make_strip(i < 2000 ? int'($urandom % 5) : 0);
      in_input = 4'($urandom);
      in_pos   = 7'($urandom);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      if (in_valid) begin
        logic [7:0] r [6];
        foreach (r[k]) r[k] = in_t[k];
        exp_cls.push_back(strip_words(r, in_input, in_pos, limit, exp_q));
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    // throughput: 40 single strips back to back with the output always ready
    random_ready = 0;
    @(negedge clk);
    begin
      int t0, t1;
      t0 = $time;
      for (int i = 0; i < 40; i++) begin
        logic [7:0] r [6];
        in_valid = 1;
        forever begin
          logic [31:0] tmp [$];
          tmp.delete();
          make_strip(0);
          foreach (r[k]) r[k] = in_t[k];
          if (strip_words(r, 4'd1, 7'(i), limit, tmp) == 1) begin
            exp_q.push_back(tmp[0]);
            break;
          end
        end
        exp_cls.push_back(1);
        in_input = 4'd1; in_pos = 7'(i);
        #1;
        checks++;
        if (!in_ready) begin failures++; $display("FAIL stall on single strips"); end
        @(negedge clk);
      end
      in_valid = 0;
      wait (exp_q.size() == 0);
      t1 = $time;
      checks++;
      // 40 strips in 40 clocks plus 2 clocks of latency
      if ((t1 - t0) / 10 > 43) begin failures++; $display("FAIL throughput %0d clocks", (t1 - t0) / 10); end
    end
    repeat (5) @(negedge clk);
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL class %0d never seen", k); end
    end
    $display("classes A=%0d B=%0d C=%0d D=%0d F=%0d", seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
