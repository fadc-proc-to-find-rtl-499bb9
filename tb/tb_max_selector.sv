// tb_max_selector: directed and random sample sets; compares the selected
// maximum, the coarse time and the number of maxima with the reference model.
module tb_max_selector;
  import fadc_pkg::*;
  import tb_ref_pkg::*;
  sample_t t [N_TB];
  logic found;
  logic [2:0] n_max, mid;
  logic [1:0] coarse;
  sample_t s_left, s_centre, s_right;
  int checks = 0, failures = 0;

  max_selector dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [7:0] r [6];
    int n, m;
    foreach (r[k]) r[k] = t[k];
    n = count_max(r, m);
    #1;
    checks++;
    if (n_max != 3'(n) || found != (n > 0)) begin
      failures++; $display("FAIL count %p: n_max=%0d ref=%0d", r, n_max, n);
    end else if (n > 0 && (mid != 3'(m) || coarse != 2'(m - 2) || s_centre != r[m-1]
                           || s_left != r[m-2] || s_right != r[m])) begin
      failures++; $display("FAIL sel %p: mid=%0d ref=%0d", r, mid, m);
    end
  endtask

  initial begin
    // one maximum at each of T2..T5
    t = '{10, 50, 30, 20, 10, 5};  check_one(); if (mid != 2) begin failures++; end
    t = '{10, 30, 50, 20, 10, 5};  check_one(); if (mid != 3) begin failures++; end
    t = '{10, 20, 30, 50, 40, 5};  check_one(); if (mid != 4) begin failures++; end
    t = '{10, 20, 30, 40, 50, 45}; check_one(); if (mid != 5 || coarse != 3) begin failures++; end
    // equal neighbour on the right counts, T5 = T6 does not
    t = '{10, 50, 50, 20, 10, 5};  check_one(); if (mid != 2) begin failures++; end
    t = '{10, 20, 30, 40, 50, 50}; check_one(); if (found) begin failures++; end
    // border and two maxima
    t = '{90, 50, 30, 20, 10, 5};  check_one(); if (found) begin failures++; end
    t = '{10, 50, 30, 60, 10, 5};  check_one(); if (n_max != 2) begin failures++; end
    for (int i = 0; i < 20000; i++) begin
      foreach (t[k]) t[k] = (i % 2) ? sample_t'($urandom) : sample_t'($urandom % 8);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
