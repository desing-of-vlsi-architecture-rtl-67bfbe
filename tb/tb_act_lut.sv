// tb_act_lut: self-checking test of act_lut.
//
// Sweeps weighted sums from -10.0 to +10.0 and compares activation and
// derivative with the logistic function evaluated here in floating point,
// quantised the same way (table step 1/32, magnitude addressing, sign by
// symmetry). Also checks exact points (0 -> 0.5 and 0.25), odd symmetry
// f(x) + f(-x) = 1, the saturation flag, and that the error against the exact
// sigmoid stays within the table step. A second instance with the tanh
// curve is checked the same way (f(-x) = -f(x), f' = 1 - f^2).
module tb_act_lut;
  import ann_pkg::*;

  acc_t  x;
  data_t f, df, ft, dft;
  logic  sat, satt;
  int checks = 0, failures = 0;

  act_lut dut (.x, .f, .df, .sat);
  act_lut #(.ACT(ACT_TANH)) dut_tanh (.x, .f(ft), .df(dft), .sat(satt));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d: got %0d expected %0d", what, x, got, exp);
    end
  endtask

  function automatic real sigm(real v);
    return 1.0 / (1.0 + $exp(-v));
  endfunction

  initial begin
    // watchdog: a combinational block cannot hang, but bound the run anyway
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t fp;
    x = 0; #1;
    check("f(0)", f, 2048);
    check("f'(0)", df, 1024);
    check("sat(0)", sat, 0);

    for (int v = -40960; v <= 40960; v += 37) begin
      longint mag;
      int idx;
      real q, s;
      x = acc_t'(v); #1;
      mag = (v < 0) ? -v : v;
      idx = int'(mag >> 7);
      check("sat", sat, idx > 255);
      if (idx > 255) idx = 255;
      q = real'(idx) / 32.0;
      s = sigm(q);
      check("f", f, (v < 0) ? 4096 - $rtoi(s * 4096.0 + 0.5) : $rtoi(s * 4096.0 + 0.5));
      check("df", df, $rtoi(s * (1.0 - s) * 4096.0 + 0.5));
      // accuracy against the exact curve inside the table range
      if (mag < 32768) begin
        real err;
        err = real'(f) / 4096.0 - sigm(real'(v) / 4096.0);
        checks++;
        if (err > 0.01 || err < -0.01) begin
          failures++;
          $display("FAIL accuracy at x=%0d: err %f", v, err);
        end
      end
      // tanh table
      s = (1.0 - $exp(-2.0 * q)) / (1.0 + $exp(-2.0 * q));
      check("tanh", ft, (v < 0) ? -$rtoi(s * 4096.0 + 0.5) : $rtoi(s * 4096.0 + 0.5));
      check("tanh'", dft, $rtoi((1.0 - s * s) * 4096.0 + 0.5));
      check("tanh sat", satt, sat);
      fp = f;
      x = acc_t'(-v); #1;
      check("symmetry", int'(fp) + int'(f), 4096);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
