// tb_neuron: self-checking test of one hidden and one output neuron.
//
// Both neurons are taken through S0..S5 by hand, as the FSM would, with an
// 8-input hidden neuron and a 4-input output neuron. Checked against values
// computed here: the weighted sum after the forward state, the activation and
// derivative (sigmoid table rebuilt here), the held sum in later states, the
// output delta (act - d) * der and the hidden delta err * der, the S4 partial
// products delta * w, and every weight after the update states (read back
// through the host port in idle), and that with `active` low neither neuron
// writes a weight. Also checks that the hidden neuron's
// weights are untouched by S3 and the output neuron's by S5.
module tb_neuron;
  import ann_pkg::*;

  localparam int DH = 8, DO = 4;
  logic clk = 0, rst_n = 0;
  ann_state_t state = ST_IDLE;
  logic act_en = 1'b1;
  logic [2:0] addr_h = '0;
  logic [1:0] addr_o = '0;
  data_t x_h = '0, x_o = '0, d_o = '0, err_in = '0;
  logic err_we = 0, we_h = 0, we_o = 0;
  data_t wd = '0;
  data_t rd_h, act_h, der_h, delta_h, rd_o, act_o, der_o, delta_o;
  acc_t psum_h, acc_h, psum_o, acc_o;
  logic sat_h, sat_o;

  int checks = 0, failures = 0;
  int w_h [DH], w_o [DO], x [DH], hv [DO];
  int sig_t [256], der_t [256];

  neuron #(.DEPTH(DH), .IS_OUTPUT(1'b0)) u_h (
    .clk, .rst_n, .state, .active(act_en), .addr(addr_h), .x_in(x_h), .d_in('0), .err_we, .err_in,
    .ext_we(we_h), .ext_wdata(wd), .w_rdata(rd_h), .act(act_h), .der(der_h),
    .delta(delta_h), .psum(psum_h), .acc(acc_h), .lut_sat(sat_h));
  neuron #(.DEPTH(DO), .IS_OUTPUT(1'b1)) u_o (
    .clk, .rst_n, .state, .active(act_en), .addr(addr_o), .x_in(x_o), .d_in(d_o), .err_we(1'b0), .err_in('0),
    .ext_we(we_o), .ext_wdata(wd), .w_rdata(rd_o), .act(act_o), .der(der_o),
    .delta(delta_o), .psum(psum_o), .acc(acc_o), .lut_sat(sat_o));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint fmul(longint a, longint b);
    return (a * b) >>> 12;
  endfunction
  function automatic int sat16i(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  function automatic int f_of(longint s);
    longint m, i;
    m = (s < 0) ? -s : s;
    i = ((m >> 7) > 255) ? 255 : (m >> 7);
    return (s < 0) ? 4096 - sig_t[i[7:0]] : sig_t[i[7:0]];
  endfunction
  function automatic int d_of(longint s);
    longint m, i;
    m = (s < 0) ? -s : s;
    i = ((m >> 7) > 255) ? 255 : (m >> 7);
    return der_t[i[7:0]];
  endfunction

  initial begin
    longint sh, so;
    int dl_o, dl_h, st, e_h;
    for (int i = 0; i < 256; i++) begin
      real sg;
      sg = 1.0 / (1.0 + $exp(-real'(i) / 32.0));
      sig_t[i] = $rtoi(sg * 4096.0 + 0.5);
      der_t[i] = $rtoi(sg * (1.0 - sg) * 4096.0 + 0.5);
    end
    for (int i = 0; i < DH; i++) begin
      w_h[i] = int'($urandom % 8001) - 4000;
      x[i]   = int'($urandom % 4097);
    end
    for (int j = 0; j < DO; j++) begin
      w_o[j] = int'($urandom % 8001) - 4000;
      hv[j]  = int'($urandom % 4097);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // host load
    for (int i = 0; i < DH; i++) begin
      @(negedge clk); we_h = 1; addr_h = 3'(i); wd = data_t'(w_h[i]);
    end
    for (int j = 0; j < DO; j++) begin
      @(negedge clk); we_h = 0; we_o = 1; addr_o = 2'(j); wd = data_t'(w_o[j]);
    end
    @(negedge clk); we_o = 0;

    // S0
    state = ST_S0; @(negedge clk);
    check("hidden acc cleared", acc_h, 0);
    check("output acc cleared", acc_o, 0);

    // S1: hidden forward
    state = ST_S1; sh = 0;
    for (int i = 0; i < DH; i++) begin
      addr_h = 3'(i); x_h = data_t'(x[i]); sh += fmul(x[i], w_h[i]);
      @(negedge clk);
    end
    check("hidden sum", acc_h, sh);
    check("hidden act", act_h, f_of(sh));
    check("hidden der", der_h, d_of(sh));
    check("output acc untouched in S1", acc_o, 0);

    // S2: output forward
    state = ST_S2; so = 0;
    for (int j = 0; j < DO; j++) begin
      addr_o = 2'(j); x_o = data_t'(hv[j]); so += fmul(hv[j], w_o[j]);
      @(negedge clk);
    end
    check("output sum", acc_o, so);
    check("output act", act_o, f_of(so));
    check("hidden sum held in S2", acc_h, sh);

    // S3: output update toward d = 1.0
    d_o = ONE; #1;
    dl_o = sat16i(fmul(f_of(so) - 4096, d_of(so)));
    check("output delta", delta_o, dl_o);
    state = ST_S3; st = -(dl_o >>> 3);
    for (int j = 0; j < DO; j++) begin
      addr_o = 2'(j); x_o = data_t'(hv[j]);
      w_o[j] = sat16i(w_o[j] + fmul(hv[j], st));
      @(negedge clk);
    end
    check("output sum held in S3", acc_o, so);

    // S4: partial products delta * w (updated weights), hidden error capture
    state = ST_S4;
    for (int j = 0; j < DO; j++) begin
      addr_o = 2'(j); #1;
      check("S4 partial product", psum_o, fmul(dl_o, w_o[j]));
      @(negedge clk);
    end
    e_h = -1234;
    err_in = data_t'(e_h); err_we = 1; @(negedge clk); err_we = 0;
    check("hidden sum held in S4", acc_h, sh);
    dl_h = sat16i(fmul(e_h, d_of(sh)));
    check("hidden delta", delta_h, dl_h);

    // S5: hidden update
    state = ST_S5; st = -(dl_h >>> 3);
    for (int i = 0; i < DH; i++) begin
      addr_h = 3'(i); x_h = data_t'(x[i]);
      w_h[i] = sat16i(w_h[i] + fmul(x[i], st));
      @(negedge clk);
    end

    // read back in idle
    state = ST_IDLE;
    for (int i = 0; i < DH; i++) begin
      addr_h = 3'(i); #1; check("hidden weight", rd_h, w_h[i]);
    end
    for (int j = 0; j < DO; j++) begin
      addr_o = 2'(j); #1; check("output weight", rd_o, w_o[j]);
    end
    // an inactive neuron must not change its weights
    act_en = 1'b0;
    state = ST_S3;
    for (int j = 0; j < DO; j++) begin addr_o = 2'(j); x_o = 16'sd4096; @(negedge clk); end
    state = ST_S5;
    for (int i = 0; i < DH; i++) begin addr_h = 3'(i); x_h = 16'sd4096; @(negedge clk); end
    state = ST_IDLE;
    for (int i = 0; i < DH; i++) begin
      addr_h = 3'(i); #1; check("inactive hidden weight", rd_h, w_h[i]);
    end
    for (int j = 0; j < DO; j++) begin
      addr_o = 2'(j); #1; check("inactive output weight", rd_o, w_o[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
