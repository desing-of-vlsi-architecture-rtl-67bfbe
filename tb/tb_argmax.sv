// tb_argmax: self-checking test of argmax over ten words.
//
// Random vectors (and vectors with ties and negative values) are compared
// with a reference scan: the index of the first largest value.
module tb_argmax;
  import ann_pkg::*;

  data_t vals [10];
  logic [3:0] idx;
  data_t max_val;
  int checks = 0, failures = 0;

  argmax #(.N_IN(10)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best;
    for (int t = 0; t < 600; t++) begin
      for (int i = 0; i < 10; i++)
        vals[i] = (t % 3 == 0) ? data_t'(int'($urandom % 5) - 2)   // many ties
                               : data_t'($urandom);
      best = 0;
      for (int i = 1; i < 10; i++) if (vals[i] > vals[best]) best = i;
      #1;
      checks += 2;
      if (idx != 4'(best) || max_val != vals[best]) begin
        failures++;
        if (failures < 10) $display("FAIL test %0d: idx %0d expected %0d", t, idx, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
