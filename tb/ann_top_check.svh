// ann_top_check.svh: body shared by the end-to-end testbenches of ann_top.
//
// The including module defines the localparams M, N, K, MAX_TRAIN, MAX_TEST,
// N_TRAIN, N_TEST, EPOCHS, W1_RANGE, W2_RANGE, MAX_CYCLES, HID_TANH and
// OUT_TANH (1 where that layer uses tanh instead of sigmoid), and for a
// second run on part of the hardware EPOCHS2, NH2 (hidden) and NO2 (output)
// neurons, and instantiates
// ann_top as `dut` with matching sizes, clocked by `clk` and reset by `rst_n`.
//
// What it does: builds a synthetic K-class data set (one random binary
// prototype per class, with pixels flipped at random), random initial
// weights, and runs a reference model of the training and testing in plain
// integer arithmetic. It then loads the same data into the design through its
// host ports, runs EPOCHS epochs on the whole network and then EPOCHS2
// epochs on NH2 hidden and NO2 output neurons, continuing from the trained
// weights, and checks
//   - every epoch's accuracy report (count and epoch number),
//   - the cycle count of every epoch, T*(1+2M+3n) + V*(1+M+n), n hidden in use,
//   - every weight of both layers after training, read back through the port,
// and that each mechanism happened at least once: all six states, back-to-back
// images, correct and wrong classifications, a weighted sum beyond the
// activation table, a weight update that changed a weight, and a run on
// part of the hardware.

  import ann_pkg::*;

  localparam int TRN_W = $clog2(MAX_TRAIN + 1);
  localparam int TST_W = $clog2(MAX_TEST + 1);
  localparam int HSEL_W = $clog2(N + 1);
  localparam int KSEL_W = $clog2(K + 1);
  longint epoch_cycles;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // host-side stimulus
  logic               start;
  logic [TRN_W-1:0]   cfg_train;
  logic [TST_W-1:0]   cfg_test;
  logic [7:0]         cfg_epochs;
  logic [HSEL_W-1:0]  cfg_hidden;
  logic [KSEL_W-1:0]  cfg_outputs;
  logic               pix_we, lbl_we, w_we, w_layer;
  logic [$clog2(M*(MAX_TRAIN+MAX_TEST))-1:0] pix_waddr;
  logic [$clog2(MAX_TRAIN+MAX_TEST)-1:0]     lbl_waddr;
  logic [$clog2(K)-1:0]                      lbl_wdata;
  logic [$clog2((N > K) ? N : K)-1:0]        w_neuron;
  logic [$clog2(M)-1:0]                      w_addr;
  data_t              pix_wdata, w_wdata;

  // DUT outputs
  logic               busy, done, hit, acc_valid, lut_sat;
  ann_state_t         state;
  logic [TST_W-1:0]   acc_count;
  logic [7:0]         acc_epoch;
  logic [$clog2(K)-1:0] pred;
  data_t              out_act [K];
  data_t              w_rdata;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- data set and reference model --------------------------
  int   img  [MAX_TRAIN+MAX_TEST][M];
  int   lbl  [MAX_TRAIN+MAX_TEST];
  int   w1   [N][M];
  int   w2   [K][N];
  int   w1_0 [N][M];
  int   w2_0 [K][N];
  int   ref_acc [$];
  int   sig_t [256];
  int   der_t [256];
  int   tanh_t [256];
  int   tder_t [256];

  function automatic int sat16i(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic longint fmul(longint a, longint b);
    return (a * b) >>> 12;     // floor of a*b/4096
  endfunction

  task automatic act(input bit use_tanh, input longint s, output int f, output int df);
    longint mag, i;
    mag = (s < 0) ? -s : s;
    i   = mag >> 7;
    if (i > 255) i = 255;
    if (use_tanh) begin
      f  = (s < 0) ? -tanh_t[i] : tanh_t[i];
      df = tder_t[i];
    end else begin
      f  = (s < 0) ? 4096 - sig_t[i] : sig_t[i];
      df = der_t[i];
    end
  endtask

  task automatic ref_run(int epochs, int nh, int no);
    int h [N], hd [N], o [K], od [K], d2 [K], d1 [N], e1 [N];
    longint s;
    int best;
    for (int i = 0; i < 256; i++) begin
      real x, sg;
      x  = real'(i) / 32.0;
      sg = 1.0 / (1.0 + $exp(-x));
      sig_t[i] = $rtoi(sg * 4096.0 + 0.5);
      der_t[i] = $rtoi(sg * (1.0 - sg) * 4096.0 + 0.5);
      sg = (1.0 - $exp(-2.0 * x)) / (1.0 + $exp(-2.0 * x));
      tanh_t[i] = $rtoi(sg * 4096.0 + 0.5);
      tder_t[i] = $rtoi((1.0 - sg * sg) * 4096.0 + 0.5);
    end
    for (int ep = 0; ep < epochs; ep++) begin
      ref_acc.push_back(0);
      for (int t = 0; t < N_TRAIN + N_TEST; t++) begin
        int id;
        id = (t < N_TRAIN) ? t : MAX_TRAIN + (t - N_TRAIN);
        for (int j = 0; j < nh; j++) begin
          s = 0;
          for (int i = 0; i < M; i++) s += fmul(img[id][i], w1[j][i]);
          act(HID_TANH, s, h[j], hd[j]);
        end
        for (int k = 0; k < no; k++) begin
          s = 0;
          for (int j = 0; j < nh; j++) s += fmul(h[j], w2[k][j]);
          act(OUT_TANH, s, o[k], od[k]);
        end
        if (t >= N_TRAIN) begin
          best = 0;
          for (int k = 1; k < no; k++) if (o[k] > o[best]) best = k;
          if (best == lbl[id]) ref_acc[ref_acc.size() - 1]++;
        end else begin
          for (int k = 0; k < no; k++) begin
            int st;
            d2[k] = sat16i(fmul(o[k] - ((lbl[id] == k) ? 4096 : 0), od[k]));
            st = -(d2[k] >>> 3);
            for (int j = 0; j < nh; j++) w2[k][j] = sat16i(w2[k][j] + fmul(h[j], st));
          end
          for (int j = 0; j < nh; j++) begin
            int st;
            s = 0;
            for (int k = 0; k < no; k++) s += fmul(d2[k], w2[k][j]);
            e1[j] = sat16i(s);
            d1[j] = sat16i(fmul(e1[j], hd[j]));
            st = -(d1[j] >>> 3);
            for (int i = 0; i < M; i++) w1[j][i] = sat16i(w1[j][i] + fmul(img[id][i], st));
          end
        end
      end
    end
  endtask

  task automatic make_data();
    int proto [K][M];
    for (int k = 0; k < K; k++)
      for (int i = 0; i < M; i++) proto[k][i] = ($urandom % 3 == 0) ? 1 : 0;
    for (int n = 0; n < MAX_TRAIN + MAX_TEST; n++) begin
      lbl[n] = $urandom % K;
      for (int i = 0; i < M; i++) begin
        bit on;
        on = proto[lbl[n]][i] != 0;
        if ($urandom % 8 == 0) on = !on;          // noise
        img[n][i] = on ? 3072 + ($urandom % 1025) : ($urandom % 512);
      end
    end
    for (int j = 0; j < N; j++)
      for (int i = 0; i < M; i++) begin
        // neuron 0 gets large weights so that its sums run past the table
        w1[j][i] = (j == 0) ? int'($urandom % 32001) - 16000
                            : int'($urandom % (2*W1_RANGE + 1)) - W1_RANGE;
        w1_0[j][i] = w1[j][i];
      end
    for (int k = 0; k < K; k++)
      for (int j = 0; j < N; j++) begin
        w2[k][j] = int'($urandom % (2*W2_RANGE + 1)) - W2_RANGE;
        w2_0[k][j] = w2[k][j];
      end
  endtask

  // ---------------- mechanism counters --------------------------------------
  int n_state [8];
  int n_part = 0, n_b2b = 0, n_hit = 0, n_miss = 0, n_sat = 0, n_wchg = 0, n_tst = 0;
  ann_state_t prev_state = ST_IDLE;
  always @(posedge clk) if (rst_n) begin
    if (state != prev_state) n_state[state]++;
    if (state == ST_S0 && (prev_state == ST_S2 || prev_state == ST_S5)) n_b2b++;
    if (lut_sat && state != ST_IDLE) n_sat++;
    if (state == ST_S2 && prev_state == ST_S1 && 32'(dut.n_hidden) != N) n_part++;
    if (state == ST_S3 && dut.g_out[0].u_n.psum != 32'(dut.g_out[0].u_n.w_rdata)) n_wchg++;
    prev_state <= state;
  end
  always @(posedge clk) if (rst_n && prev_state == ST_S2 && state != ST_S2 && state != ST_S3) n_tst++;

  // ---------------- epoch reports -------------------------------------------
  int     n_reports = 0, run_base = 0;
  longint last_report = -1;
  longint busy_cycles = 0;
  always @(posedge clk) if (rst_n && state != ST_IDLE) busy_cycles <= busy_cycles + 1;
  always @(posedge clk) if (rst_n) begin
    if (hit) n_hit++;
    if (acc_valid) begin
      checks++;
      if (n_reports >= ref_acc.size() || acc_count != TST_W'(ref_acc[n_reports])
          || acc_epoch != 8'(n_reports - run_base)) begin
        failures++;
        $display("FAIL epoch report %0d: count %0d expected %0d, epoch %0d",
                 n_reports, acc_count, (n_reports < ref_acc.size()) ? ref_acc[n_reports] : -1, acc_epoch);
      end else
        $display("epoch %0d: %0d of %0d test images correct (cycle %0d)", acc_epoch, acc_count, N_TEST, cycle);
      if (last_report >= 0) begin
        checks++;
        if (cycle - last_report != epoch_cycles) begin
          failures++;
          $display("FAIL epoch length %0d expected %0d", cycle - last_report, epoch_cycles);
        end
      end
      last_report = cycle;
      n_reports++;
    end
  end

  // ---------------- watchdog -------------------------------------------------
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- one run of the design -------------------------------------
  task automatic run_dut(int epochs, int nh, int no);
    longint busy0;
    epoch_cycles = longint'(N_TRAIN) * (1 + 2*M + 3*nh) + longint'(N_TEST) * (1 + M + nh);
    run_base = n_reports;
    last_report = -1;
    busy0 = busy_cycles;
    @(negedge clk);
    cfg_epochs = 8'(epochs); cfg_hidden = HSEL_W'(nh); cfg_outputs = KSEL_W'(no);
    start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (n_reports - run_base != epochs) begin
      failures++; $display("FAIL %0d epoch reports, expected %0d", n_reports - run_base, epochs);
    end
    checks++;
    if (busy_cycles - busy0 != epochs * epoch_cycles) begin
      failures++; $display("FAIL %0d busy cycles, expected %0d", busy_cycles - busy0, epochs * epoch_cycles);
    end
  endtask

  // ---------------- stimulus -------------------------------------------------
  initial begin
    clk = 0; rst_n = 0; start = 0;
    cfg_train = TRN_W'(N_TRAIN); cfg_test = TST_W'(N_TEST); cfg_epochs = 8'(EPOCHS);
    cfg_hidden = HSEL_W'(N); cfg_outputs = KSEL_W'(K);
    pix_we = 0; lbl_we = 0; w_we = 0; w_layer = 0;
    pix_waddr = '0; pix_wdata = '0; lbl_waddr = '0; lbl_wdata = '0;
    w_neuron = '0; w_addr = '0; w_wdata = '0;
    foreach (n_state[s]) n_state[s] = 0;

    make_data();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // load images, labels and weights through the host ports
    for (int n = 0; n < MAX_TRAIN + MAX_TEST; n++) begin
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        pix_we = 1; pix_waddr = $bits(pix_waddr)'(n*M + i); pix_wdata = data_t'(img[n][i]);
      end
      @(negedge clk);
      pix_we = 0; lbl_we = 1; lbl_waddr = $bits(lbl_waddr)'(n); lbl_wdata = $bits(lbl_wdata)'(lbl[n]);
    end
    for (int j = 0; j < N; j++)
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        lbl_we = 0; w_we = 1; w_layer = 0; w_neuron = $bits(w_neuron)'(j);
        w_addr = $bits(w_addr)'(i); w_wdata = data_t'(w1[j][i]);
      end
    for (int k = 0; k < K; k++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        w_we = 1; w_layer = 1; w_neuron = $bits(w_neuron)'(k);
        w_addr = $bits(w_addr)'(j); w_wdata = data_t'(w2[k][j]);
      end
    @(negedge clk);
    w_we = 0; lbl_we = 0;

    // run 1: the whole network
    ref_run(EPOCHS, N, K);
    run_dut(EPOCHS, N, K);
    // run 2: part of the hardware, continuing from the trained weights
    $display("run on %0d hidden and %0d output neurons", NH2, NO2);
    ref_run(EPOCHS2, NH2, NO2);
    run_dut(EPOCHS2, NH2, NO2);

    // read back every weight
    begin
      int bad, changed;
      bad = 0; changed = 0;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < M; i++) begin
          w_layer = 0; w_neuron = $bits(w_neuron)'(j); w_addr = $bits(w_addr)'(i);
          #1;
          checks++;
          if (w_rdata != data_t'(w1[j][i])) begin
            failures++; bad++;
            if (bad < 10) $display("FAIL w1[%0d][%0d] = %0d expected %0d", j, i, w_rdata, w1[j][i]);
          end
          if (w1[j][i] != w1_0[j][i]) changed++;
        end
      for (int k = 0; k < K; k++)
        for (int j = 0; j < N; j++) begin
          w_layer = 1; w_neuron = $bits(w_neuron)'(k); w_addr = $bits(w_addr)'(j);
          #1;
          checks++;
          if (w_rdata != data_t'(w2[k][j])) begin
            failures++; bad++;
            if (bad < 10) $display("FAIL w2[%0d][%0d] = %0d expected %0d", k, j, w_rdata, w2[k][j]);
          end
          if (w2[k][j] != w2_0[k][j]) changed++;
        end
      $display("weights changed by training: %0d", changed);
    end

    // mechanisms
    n_miss = (EPOCHS + EPOCHS2) * N_TEST - n_hit;
    $display("states entered: S0 %0d S1 %0d S2 %0d S3 %0d S4 %0d S5 %0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_state[4], n_state[5]);
    $display("images on part of the hidden layer %0d", n_part);
    $display("back-to-back images %0d, test images %0d, correct %0d, wrong %0d, table saturation cycles %0d, output weight changes %0d",
             n_b2b, n_tst, n_hit, n_miss, n_sat, n_wchg);
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (n_state[s] == 0) begin failures++; $display("FAIL state S%0d never entered", s); end
    end
    checks++; if (n_part == 0) begin failures++; $display("FAIL no image run on part of the hidden layer"); end
    checks++; if (n_b2b == 0)  begin failures++; $display("FAIL no back-to-back image"); end
    checks++; if (n_hit == 0)  begin failures++; $display("FAIL no correct classification"); end
    checks++; if (n_miss == 0) begin failures++; $display("FAIL no wrong classification"); end
    checks++; if (n_sat == 0)  begin failures++; $display("FAIL activation table never saturated"); end
    checks++; if (n_wchg == 0) begin failures++; $display("FAIL no weight update changed a weight"); end
    checks++; if (n_tst != (EPOCHS + EPOCHS2) * N_TEST) begin failures++; $display("FAIL %0d test images run", n_tst); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
