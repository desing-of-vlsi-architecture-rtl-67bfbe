// tb_train_test_ctrl: self-checking test of train_test_ctrl.
//
// The controller drives a real ann_fsm of a tiny network (M = 6, N = 3).
// The test bench stands in for the datapath: it holds a label per image and,
// when a test image ends, presents a prediction that is right or wrong at
// random. Four runs are checked: 3 training + 4 test images for 3 epochs,
// test only, training only, and a minimal one, with various hidden and
// output neuron counts (including out-of-range ones, which select all). For each run it checks the order and type of
// the images (img_idx, train), every epoch report (correct count and epoch
// number), the number of reports, the total cycle count, busy/done, and the sampled neuron counts.
module tb_train_test_ctrl;
  import ann_pkg::*;

  localparam int MAX_TRAIN = 5, MAX_TEST = 5, M = 6, N = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] cfg_train = '0, cfg_test = '0;
  logic [7:0] cfg_epochs = '0;
  logic [5:0] cfg_hidden = '0, n_hidden;
  logic [3:0] cfg_outputs = '0, n_outputs;
  ann_state_t state;
  logic [2:0] cnt;
  logic last, img_done, fsm_start, train, more;
  logic [3:0] img_idx;
  logic [3:0] pred = '0, label;
  logic busy, done, hit, acc_valid;
  logic [2:0] acc_count;
  logic [7:0] acc_epoch;

  int checks = 0, failures = 0;
  int labels [MAX_TRAIN + MAX_TEST];
  int exp_idx [$];
  bit exp_train [$];
  int exp_acc [$];
  int n_reports;
  int n_test_done, cur_v = 1;
  longint busy_cycles;

  ann_fsm #(.M(M), .N(N)) u_fsm (.clk, .rst_n, .start(fsm_start), .train, .more, .n_hid(3'(n_hidden)),
                                 .state, .cnt, .last, .img_done);
  train_test_ctrl #(.MAX_TRAIN(MAX_TRAIN), .MAX_TEST(MAX_TEST), .N(N), .K(10)) dut (.*);

  assign label = 4'(labels[img_idx]);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  // datapath stand-in: check each finished image, pick a prediction
  always @(posedge clk) if (rst_n) begin
    if (state != ST_IDLE) busy_cycles++;
    if (img_done) begin
      if (exp_idx.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected image %0d", img_idx);
      end else begin
        check("image index", img_idx, exp_idx.pop_front());
        check("image type", train, exp_train.pop_front());
      end
      if (!train) begin
        bit right;
        right = ($urandom % 2) == 0;
        pred <= right ? label : 4'((label + 1) % 10);
        if (right) exp_acc[n_test_done / cur_v]++;
        n_test_done++;
      end
    end
    if (acc_valid) begin
      check("epoch number", acc_epoch, n_reports);
      check("correct count", acc_count, exp_acc[n_reports]);
      n_reports++;
    end
  end

  task automatic run(int t, int v, int e, int nh, int no);
    exp_idx.delete(); exp_train.delete(); exp_acc.delete();
    for (int ep = 0; ep < e; ep++) begin
      for (int i = 0; i < t; i++) begin exp_idx.push_back(i); exp_train.push_back(1); end
      for (int i = 0; i < v; i++) begin exp_idx.push_back(MAX_TRAIN + i); exp_train.push_back(0); end
    end
    n_reports = 0; busy_cycles = 0; n_test_done = 0; cur_v = (v > 0) ? v : 1;
    @(negedge clk);
    cfg_train = 3'(t); cfg_test = 3'(v); cfg_epochs = 8'(e);
    cfg_hidden = 6'(nh); cfg_outputs = 4'(no);
    start = 1;
    // exp_acc grows as epochs begin; one slot per epoch with tests
    if (v > 0) for (int ep = 0; ep < e; ep++) exp_acc.push_back(0);
    @(negedge clk); start = 0;
    check("busy after start", busy, 1);
    check("hidden neurons in use", n_hidden, (nh == 0 || nh > N) ? N : nh);
    check("output neurons in use", n_outputs, (no < 2 || no > 10) ? 10 : no);
    wait (done);
    @(negedge clk);
    check("busy after done", busy, 0);
    check("images left", exp_idx.size(), 0);
    check("reports", n_reports, (v > 0) ? e : 0);
    check("cycles", busy_cycles, e * (t * (1 + 2*M + 3*n_hidden) + v * (1 + M + n_hidden)));
  endtask


  initial begin
    for (int i = 0; i < MAX_TRAIN + MAX_TEST; i++) labels[i] = $urandom % 10;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, 4, 3, N, 10);
    run(0, 2, 2, 2, 4);
    run(2, 0, 2, 0, 0);   // out-of-range sizes select the whole layer
    run(1, 1, 1, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
