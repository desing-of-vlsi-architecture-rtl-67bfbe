// tb_ann_top_fwd12: forward-propagation workload, 784 x 12 x 10, on the
// default-size ann_top.
//
// The 784 x 32 x 10 build is told to use only 12 hidden neurons
// (cfg_hidden = 12) and runs 100 test images with no training (cfg_train =
// 0), i.e. inference only, as in a 784 x 12 x 10 forward-propagation
// comparison. Random weights and synthetic images are loaded through the host
// ports. Checked against an integer reference model:
//   - every image's classification (the `hit` pulse of each test image),
//   - the number of correct images reported at the end of the epoch,
//   - the forward latency of every image, 1 + 784 + 12 = 797 cycles,
//   - that no weight changed (no training took place).
module tb_ann_top_fwd12;
  import ann_pkg::*;

  localparam int M = 784, N = 32, K = 10, NH = 12, N_IMG = 100, MAX_TRAIN = 100;
  localparam int LAT = 1 + M + NH;

  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] cfg_train = '0, cfg_test = 7'(N_IMG);
  logic [7:0] cfg_epochs = 8'd1;
  logic [5:0] cfg_hidden = 6'(NH);
  logic [3:0] cfg_outputs = '0;
  logic busy, done, hit, acc_valid, lut_sat;
  ann_state_t state;
  logic [6:0] acc_count;
  logic [7:0] acc_epoch;
  logic [3:0] pred;
  data_t out_act [K];
  logic pix_we = 0, lbl_we = 0, w_we = 0, w_layer = 0;
  logic [17:0] pix_waddr = '0;
  logic [7:0]  lbl_waddr = '0;
  logic [3:0]  lbl_wdata = '0;
  logic [4:0]  w_neuron = '0;
  logic [9:0]  w_addr = '0;
  data_t pix_wdata = '0, w_wdata = '0, w_rdata;

  int checks = 0, failures = 0;
  int img [N_IMG][M];
  int lbl [N_IMG];
  int w1 [NH][M];
  int w2 [K][NH];
  bit ref_hit [N_IMG];
  int ref_count = 0;
  int sig_t [256];

  ann_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fmul(longint a, longint b);
    return (a * b) >>> 12;
  endfunction

  function automatic int f_of(longint s);
    longint m, i;
    m = (s < 0) ? -s : s;
    i = ((m >> 7) > 255) ? 255 : (m >> 7);
    return (s < 0) ? 4096 - sig_t[i[7:0]] : sig_t[i[7:0]];
  endfunction

  task automatic reference();
    int h [NH];
    int o [K];
    longint s;
    int best;
    for (int i = 0; i < 256; i++) begin
      real sg;
      sg = 1.0 / (1.0 + $exp(-real'(i) / 32.0));
      sig_t[i] = $rtoi(sg * 4096.0 + 0.5);
    end
    for (int n = 0; n < N_IMG; n++) begin
      for (int j = 0; j < NH; j++) begin
        s = 0;
        for (int i = 0; i < M; i++) s += fmul(img[n][i], w1[j][i]);
        h[j] = f_of(s);
      end
      best = 0;
      for (int k = 0; k < K; k++) begin
        s = 0;
        for (int j = 0; j < NH; j++) s += fmul(h[j], w2[k][j]);
        o[k] = f_of(s);
        if (o[k] > o[best]) best = k;
      end
      ref_hit[n] = (best == lbl[n]);
      if (ref_hit[n]) ref_count++;
    end
  endtask

  // per-image latency and classification
  ann_state_t prev = ST_IDLE;
  longint s0_cycle = -1, cycle = 0;
  int n_img = 0, n_cmp = 0, n_right = 0;
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    prev  <= state;
    if (state == ST_S0) begin
      if (s0_cycle >= 0) begin
        checks++;
        if (cycle - s0_cycle != LAT) begin
          failures++; $display("FAIL image latency %0d, expected %0d", cycle - s0_cycle, LAT);
        end
      end
      s0_cycle <= cycle;
    end
    if (prev == ST_S2 && state != ST_S2) begin
      if (state != ST_IDLE && state != ST_S0) begin
        checks++; failures++; $display("FAIL a training state ran");
      end
      n_img++;
    end
    // the comparison of image n_cmp happens in the cycle after its last S2 cycle
    if (dut.u_ctrl.cmp_pending) begin
      checks++;
      if (hit != ref_hit[n_cmp]) begin
        failures++; $display("FAIL image %0d: hit %0d expected %0d", n_cmp, hit, ref_hit[n_cmp]);
      end
      if (hit) n_right++;
      n_cmp++;
    end
    if (acc_valid) begin
      checks++;
      if (acc_count != 7'(ref_count)) begin
        failures++; $display("FAIL count %0d expected %0d", acc_count, ref_count);
      end
    end
  end

  initial begin
    int changed;
    // data: one random binary prototype per class, 1/8 of the pixels flipped
    int proto [K][M];
    for (int k = 0; k < K; k++)
      for (int i = 0; i < M; i++) proto[k][i] = ($urandom % 3 == 0) ? 1 : 0;
    for (int n = 0; n < N_IMG; n++) begin
      lbl[n] = $urandom % K;
      for (int i = 0; i < M; i++) begin
        bit on;
        on = proto[lbl[n]][i] != 0;
        if ($urandom % 8 == 0) on = !on;
        img[n][i] = on ? 3072 + ($urandom % 1025) : ($urandom % 512);
      end
    end
    for (int j = 0; j < NH; j++)
      for (int i = 0; i < M; i++) w1[j][i] = int'($urandom % 1801) - 900;
    for (int k = 0; k < K; k++)
      for (int j = 0; j < NH; j++) w2[k][j] = int'($urandom % 8001) - 4000;
    reference();

    repeat (3) @(negedge clk);
    rst_n = 1;
    // test images live at MAX_TRAIN + n
    for (int n = 0; n < N_IMG; n++) begin
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        pix_we = 1; pix_waddr = 18'((MAX_TRAIN + n) * M + i); pix_wdata = data_t'(img[n][i]);
      end
      @(negedge clk);
      pix_we = 0; lbl_we = 1; lbl_waddr = 8'(MAX_TRAIN + n); lbl_wdata = 4'(lbl[n]);
    end
    for (int j = 0; j < NH; j++)
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        lbl_we = 0; w_we = 1; w_layer = 0; w_neuron = 5'(j); w_addr = 10'(i); w_wdata = data_t'(w1[j][i]);
      end
    for (int k = 0; k < K; k++)
      for (int j = 0; j < NH; j++) begin
        @(negedge clk);
        w_we = 1; w_layer = 1; w_neuron = 5'(k); w_addr = 10'(j); w_wdata = data_t'(w2[k][j]);
      end
    @(negedge clk);
    w_we = 0; lbl_we = 0;

    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);

    checks++;
    if (n_img != N_IMG || n_cmp != N_IMG) begin
      failures++; $display("FAIL %0d images run, %0d compared", n_img, n_cmp);
    end
    changed = 0;
    for (int j = 0; j < NH; j++)
      for (int i = 0; i < M; i++) begin
        w_layer = 0; w_neuron = 5'(j); w_addr = 10'(i); #1;
        if (w_rdata != data_t'(w1[j][i])) changed++;
      end
    checks++;
    if (changed != 0) begin failures++; $display("FAIL %0d weights changed", changed); end
    $display("784 x 12 x 10 forward pass: %0d cycles per image, %0d of %0d classified correctly (untrained)",
             LAT, n_right, N_IMG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
