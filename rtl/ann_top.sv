// ann_top: on-chip training and testing of an M x N x K multilayer perceptron
// (784 x 32 x 10 by default) with stochastic-gradient back propagation.
//
// Structure: N hidden neurons (weight memories of depth M) and K output
// neurons (depth N), each with its own MAC unit and activation table; a
// K-operand adder that forms the hidden-layer error; the six-state FSM; the
// epoch/accuracy controller; the image memory and an argmax on the outputs.
//
// Per training image (1 + 2M + 3N cycles, 1665 by default):
//   S0  1 cycle   clear all accumulators
//   S1  M cycles  pixel x[i] is broadcast to all hidden neurons, each adds
//                 x[i]*w1[j][i]; H[j] and its derivative come from the table
//   S2  N cycles  H[j] is broadcast to all output neurons, each adds
//                 H[j]*w2[k][j]; at the end O[k], e2 = O - d and
//                 delta2 = e2 * O' are ready combinationally
//   S3  N cycles  w2[k][j] -= H[j] * (delta2[k] >>> 3), all k in parallel
//   S4  N cycles  e1[j] = sum_k delta2[k] * w2[k][j] in the K-operand adder,
//                 stored in hidden neuron j; delta1 = e1 * H' follows
//   S5  M cycles  w1[j][i] -= x[i] * (delta1[j] >>> 3), all j in parallel
// A test image runs S0..S2 only (1 + M + N cycles, 817 by default), and its
// predicted class (argmax of O) is compared with its label. An epoch of
// T training and V test images takes exactly T*(1+2M+3N) + V*(1+M+N) cycles.
//
// Host interface (use while busy is low): pixels and labels are written
// into the image memory (training images first, test images from index
// MAX_TRAIN), and weights are written or read one word at a time through
// w_layer / w_neuron / w_addr. Then a `start` pulse runs cfg_epochs epochs of
// cfg_train training and cfg_test test images. Each epoch's number of
// correct test images appears on acc_count with a one-cycle acc_valid pulse.
// cfg_hidden / cfg_outputs let a run use only part of the hardware: the
// first cfg_hidden hidden and cfg_outputs output neurons form the network
// (S2..S4 then last cfg_hidden cycles), the others neither update their
// weights nor take part in the error sum or the prediction.
// Reset is active-low and synchronous; it does not clear the memories.
//
// Numbers are 16-bit fixed point with 12 fraction bits, learning rate 1/8,
// sigmoid activation by default; HID_ACT / OUT_ACT select sigmoid or tanh
// per layer. The network shape, the states, the neuron structure,
// the shared adder and the cycle counts follow the design; the fixed-point
// split, the memory layout and the host interface are this implementation's.
// Note that the output weights are updated (S3) before the hidden error is
// formed from them (S4), in the design's state order.
module ann_top
  import ann_pkg::*;
#(
  parameter int M         = 784,   // inputs (pixels per image)
  parameter int N         = 32,    // hidden neurons
  parameter int K         = 10,    // output neurons (classes)
  parameter int MAX_TRAIN = 100,   // training images held
  parameter int MAX_TEST  = 100,   // test images held
  parameter int EPOCH_W   = 8,
  parameter act_fn_t HID_ACT = ACT_SIGMOID,  // hidden-layer activation
  parameter act_fn_t OUT_ACT = ACT_SIGMOID,  // output-layer activation
  parameter int LBL_W     = $clog2(K),
  parameter int TRN_W     = $clog2(MAX_TRAIN + 1),
  parameter int TST_W     = $clog2(MAX_TEST + 1),
  parameter int N_IMG     = MAX_TRAIN + MAX_TEST,
  parameter int IMG_AW    = $clog2(N_IMG),
  parameter int PIX_AW    = $clog2(M * N_IMG),
  parameter int HID_AW    = $clog2(M),
  parameter int OUT_AW    = $clog2(N),
  parameter int NSEL_W    = $clog2((N > K) ? N : K),
  parameter int CNT_W     = $clog2((M > N) ? M : N),
  parameter int HSEL_W    = $clog2(N + 1),
  parameter int KSEL_W    = $clog2(K + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // run control
  input  logic               start,
  input  logic [TRN_W-1:0]   cfg_train,
  input  logic [TST_W-1:0]   cfg_test,
  input  logic [EPOCH_W-1:0] cfg_epochs,
  input  logic [HSEL_W-1:0]  cfg_hidden,  // hidden neurons to use (0: all N)
  input  logic [KSEL_W-1:0]  cfg_outputs, // output neurons to use (0: all K)
  output logic               busy,
  output logic               done,
  output ann_state_t         state,
  output logic               hit,         // a test image was classified correctly
  output logic               acc_valid,
  output logic [TST_W-1:0]   acc_count,
  output logic [EPOCH_W-1:0] acc_epoch,
  output logic [LBL_W-1:0]   pred,        // argmax of the output layer
  output data_t              out_act [K], // output activations
  output logic               lut_sat,     // some weighted sum beyond the table
  // image memory loading
  input  logic               pix_we,
  input  logic [PIX_AW-1:0]  pix_waddr,
  input  data_t              pix_wdata,
  input  logic               lbl_we,
  input  logic [IMG_AW-1:0]  lbl_waddr,
  input  logic [LBL_W-1:0]   lbl_wdata,
  // weight access
  input  logic               w_we,
  input  logic               w_layer,     // 0: hidden, 1: output
  input  logic [NSEL_W-1:0]  w_neuron,
  input  logic [HID_AW-1:0]  w_addr,
  input  data_t              w_wdata,
  output data_t              w_rdata
);

  logic [CNT_W-1:0]  cnt;
  logic              last, img_done, fsm_start, train, more;
  logic [IMG_AW-1:0] img_idx;
  logic [LBL_W-1:0]  label;
  data_t             pixel;
  logic              idle;
  logic [HSEL_W-1:0] n_hidden;
  logic [KSEL_W-1:0] n_outputs;
  data_t             o_masked [K];
  acc_t              psum_masked [K];

  data_t             h_act [N];
  data_t             h_rd  [N];
  logic              h_sat [N];
  data_t             o_act [K];
  data_t             o_rd  [K];
  logic              o_sat [K];
  acc_t              o_psum [K];
  localparam int     E1_W = ACC_W + ((K > 1) ? $clog2(K) : 0);
  logic signed [E1_W-1:0] e1_sum;
  data_t             e1;
  data_t             h_bcast;

  assign idle = (state == ST_IDLE);

  // ---- control --------------------------------------------------------------
  ann_fsm #(.M(M), .N(N), .CNT_W(CNT_W)) u_fsm (
    .clk, .rst_n,
    .start    (fsm_start),
    .train    (train),
    .more     (more),
    .n_hid    (CNT_W'(n_hidden)),
    .state    (state),
    .cnt      (cnt),
    .last     (last),
    .img_done (img_done)
  );

  train_test_ctrl #(
    .MAX_TRAIN(MAX_TRAIN), .MAX_TEST(MAX_TEST), .LBL_W(LBL_W), .EPOCH_W(EPOCH_W),
    .N(N), .K(K), .HSEL_W(HSEL_W), .KSEL_W(KSEL_W),
    .TRN_W(TRN_W), .TST_W(TST_W), .IMG_AW(IMG_AW)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .cfg_train, .cfg_test, .cfg_epochs, .cfg_hidden, .cfg_outputs,
    .n_hidden, .n_outputs,
    .state, .img_done,
    .fsm_start, .train, .more, .img_idx,
    .pred, .label,
    .busy, .done, .hit, .acc_valid, .acc_count, .acc_epoch
  );

  // ---- input memory ---------------------------------------------------------
  image_mem #(.M(M), .N_IMG(N_IMG), .LBL_W(LBL_W), .PIX_AW(PIX_AW), .IMG_AW(IMG_AW)) u_img (
    .clk,
    .pix_we, .pix_waddr, .pix_wdata,
    .pix_raddr (PIX_AW'(32'(img_idx) * M + 32'(cnt))),
    .pix_rdata (pixel),
    .lbl_we, .lbl_waddr, .lbl_wdata,
    .lbl_raddr (img_idx),
    .lbl_rdata (label)
  );

  // ---- hidden layer ---------------------------------------------------------
  assign e1 = sat16(acc_t'(e1_sum > E1_W'(32'sh7fff_ffff) ? E1_W'(32'sh7fff_ffff) :
                          e1_sum < -E1_W'(32'sh7fff_ffff) ? -E1_W'(32'sh7fff_ffff) : e1_sum));

  for (genvar j = 0; j < N; j++) begin : g_hid
    acc_t  unused_psum, unused_acc;
    data_t unused_der, unused_delta;
    neuron #(.DEPTH(M), .IS_OUTPUT(1'b0), .ACT(HID_ACT), .ADDR_W(HID_AW)) u_n (
      .clk, .rst_n,
      .state     (state),
      .active    (32'(j) < 32'(n_hidden)),
      .addr      (idle ? w_addr : HID_AW'(cnt)),
      .x_in      (pixel),
      .d_in      ('0),
      .err_we    (state == ST_S4 && cnt == CNT_W'(j)),
      .err_in    (e1),
      .ext_we    (w_we && idle && !w_layer && w_neuron == NSEL_W'(j)),
      .ext_wdata (w_wdata),
      .w_rdata   (h_rd[j]),
      .act       (h_act[j]),
      .der       (unused_der),
      .delta     (unused_delta),
      .psum      (unused_psum),
      .acc       (unused_acc),
      .lut_sat   (h_sat[j])
    );
  end

  // Hidden activation selected by the counter, broadcast to the output layer.
  assign h_bcast = h_act[OUT_AW'(cnt)];

  // ---- output layer ---------------------------------------------------------
  for (genvar k = 0; k < K; k++) begin : g_out
    acc_t  unused_acc;
    data_t unused_der, unused_delta;
    neuron #(.DEPTH(N), .IS_OUTPUT(1'b1), .ACT(OUT_ACT), .ADDR_W(OUT_AW)) u_n (
      .clk, .rst_n,
      .state     (state),
      .active    (32'(k) < 32'(n_outputs)),
      .addr      (idle ? OUT_AW'(w_addr) : OUT_AW'(cnt)),
      .x_in      (h_bcast),
      .d_in      ((label == LBL_W'(k)) ? ONE : data_t'(0)),
      .err_we    (1'b0),
      .err_in    ('0),
      .ext_we    (w_we && idle && w_layer && w_neuron == NSEL_W'(k)),
      .ext_wdata (w_wdata),
      .w_rdata   (o_rd[k]),
      .act       (o_act[k]),
      .der       (unused_der),
      .delta     (unused_delta),
      .psum      (o_psum[k]),
      .acc       (unused_acc),
      .lut_sat   (o_sat[k])
    );
  end

  // ---- hidden error: K-operand adder -----------------------------------------
  // Output neurons that are not in use contribute nothing.
  always_comb begin
    for (int k = 0; k < K; k++) begin
      psum_masked[k] = (k < 32'(n_outputs)) ? o_psum[k] : '0;
      o_masked[k]    = (k < 32'(n_outputs)) ? o_act[k] : data_t'(-(1 << (DATA_W-1)));
    end
  end

  adder_tree #(.N_OPS(K), .IN_W(ACC_W), .OUT_W(E1_W)) u_e1 (.ops(psum_masked), .sum(e1_sum));

  // ---- prediction -----------------------------------------------------------
  data_t unused_max;
  argmax #(.N_IN(K), .IDX_W(LBL_W)) u_argmax (.vals(o_masked), .idx(pred), .max_val(unused_max));

  assign out_act = o_act;

  always_comb begin
    lut_sat = 1'b0;
    for (int j = 0; j < N; j++) lut_sat |= h_sat[j];
    for (int k = 0; k < K; k++) lut_sat |= o_sat[k];
    w_rdata = '0;
    if (w_layer) begin
      for (int k = 0; k < K; k++) if (w_neuron == NSEL_W'(k)) w_rdata = o_rd[k];
    end else begin
      for (int j = 0; j < N; j++) if (w_neuron == NSEL_W'(j)) w_rdata = h_rd[j];
    end
  end

  // Unused warnings aside, `last` is only observed by the FSM itself.
  logic unused_last;
  assign unused_last = last;

  // Memories are loaded only while the network is idle.
  a_load_idle : assert property (@(posedge clk) disable iff (!rst_n)
    (pix_we || lbl_we || w_we) |-> idle);

endmodule
