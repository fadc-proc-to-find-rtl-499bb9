// tb_strip_time_buffer: writes a full event (4 inputs x 6 time blocks x 128
// strips, random order of inputs in time) and reads every strip back,
// checking that one read returns the 6 time blocks of the addressed strip
// one clock later.
module tb_strip_time_buffer;
  import fadc_pkg::*;
  localparam int NI = 4, NS = 128;
  logic clk = 0;
  logic we [NI];
  logic [2:0] we_tb [NI];
  logic [6:0] we_strip [NI];
  strip_word_t we_data [NI];
  logic rd_en = 0;
  logic [8:0] rd_addr = '0;
  strip_word_t rd_data [N_TB];
  strip_word_t model [NI][N_TB][NS];
  int checks = 0, failures = 0;

  strip_time_buffer #(.N_IN(NI), .N_STRIPS(NS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos [NI];
    foreach (pos[i]) pos[i] = 0;
    foreach (we[i]) we[i] = 0;
    // each input writes its 768 words at its own random pace
    while (pos[0] < 768 || pos[1] < 768 || pos[2] < 768 || pos[3] < 768) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        we[i] = (pos[i] < 768) && ($urandom % 3 != 0);
        we_tb[i] = 3'(pos[i] / NS);
        we_strip[i] = 7'(pos[i] % NS);
        we_data[i] = strip_word_t'($urandom);
        if (we[i]) begin
          model[i][pos[i] / NS][pos[i] % NS] = we_data[i];
          pos[i]++;
        end
      end
    end
    @(negedge clk);
    foreach (we[i]) we[i] = 0;
    for (int r = 0; r < 2000; r++) begin
      int a;
      a = (r < NI*NS) ? r : int'($urandom % (NI*NS));
      @(negedge clk);
      rd_en = 1; rd_addr = 9'(a);
      @(negedge clk);
      rd_en = ($urandom % 2);     // a second read may be issued; data must follow it
      rd_addr = 9'($urandom);
      #1;
      for (int t = 0; t < N_TB; t++) begin
        checks++;
        if (rd_data[t] != model[a / NS][t][a % NS]) begin
          failures++; $display("FAIL addr %0d tb %0d", a, t);
        end
      end
      @(negedge clk);
      rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
