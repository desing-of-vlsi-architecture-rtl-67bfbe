// train_test_ctrl: epoch, image and accuracy sequencer.
//
// One epoch trains on cfg_train images (stochastic gradient descent, one
// weight update per image) and then tests cfg_test images, counting those
// whose predicted class equals the label. cfg_epochs epochs are run after a
// `start` pulse; the configuration is sampled at start and may be any value
// up to the memory sizes MAX_TRAIN / MAX_TEST. The network can also be run
// on part of the hardware: cfg_hidden hidden neurons (1..N) and cfg_outputs
// output neurons (2..K) are used, the rest stay idle; an out-of-range value
// selects the whole layer. The sampled sizes are held on n_hidden/n_outputs.
//
// The controller tells the six-state FSM whether the current image is a
// training image (`train`), whether another image follows (`more`), and
// which image to read (`img_idx`: training image t at t, test image v at
// MAX_TRAIN + v). A test image's forward pass ends on the FSM's last S2
// cycle, and its output sums are valid one cycle later (they are kept until
// the next S0 clears them), so the prediction `pred` is compared with the
// label in the cycle after img_done (`cmp_pending`). At the end of each epoch
// `acc_valid` pulses for one cycle with the number of correct test images
// on `acc_count` and the epoch number on `acc_epoch`; `hit` pulses for every
// correct test image. `busy` is high from start until the last comparison,
// `done` from then until the next start.
//
// The train-then-test order within an epoch, the accuracy count and the
// choice of how much of the hardware a network uses follow the design; the handshake signals and the image addressing are this
// implementation's choices.
module train_test_ctrl
  import ann_pkg::*;
#(
  parameter int MAX_TRAIN = 100,
  parameter int MAX_TEST  = 100,
  parameter int LBL_W     = 4,
  parameter int EPOCH_W   = 8,
  parameter int N         = 32,    // hidden neurons built
  parameter int K         = 10,    // output neurons built
  parameter int HSEL_W    = $clog2(N + 1),
  parameter int KSEL_W    = $clog2(K + 1),
  parameter int TRN_W     = $clog2(MAX_TRAIN + 1),
  parameter int TST_W     = $clog2(MAX_TEST + 1),
  parameter int IMG_AW    = $clog2(MAX_TRAIN + MAX_TEST)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [TRN_W-1:0]   cfg_train,
  input  logic [TST_W-1:0]   cfg_test,
  input  logic [EPOCH_W-1:0] cfg_epochs,
  input  logic [HSEL_W-1:0]  cfg_hidden,   // hidden neurons to use, 1..N
  input  logic [KSEL_W-1:0]  cfg_outputs,  // output neurons (classes) to use, 2..K
  output logic [HSEL_W-1:0]  n_hidden,
  output logic [KSEL_W-1:0]  n_outputs,
  // FSM side
  input  ann_state_t         state,
  input  logic               img_done,
  output logic               fsm_start,
  output logic               train,
  output logic               more,
  output logic [IMG_AW-1:0]  img_idx,
  // prediction and label of the current image
  input  logic [LBL_W-1:0]   pred,
  input  logic [LBL_W-1:0]   label,
  // status
  output logic               busy,
  output logic               done,
  output logic               hit,
  output logic               acc_valid,
  output logic [TST_W-1:0]   acc_count,
  output logic [EPOCH_W-1:0] acc_epoch
);

  logic [TRN_W-1:0]   n_train;
  logic [TST_W-1:0]   n_test;
  logic [EPOCH_W-1:0] n_epochs;
  logic [TST_W-1:0]   img_cnt;      // wide enough for both phases
  logic [EPOCH_W-1:0] epoch;
  logic [TST_W-1:0]   correct;
  logic               cmp_pending, cmp_last;
  logic [LBL_W-1:0]   cmp_label;
  logic [EPOCH_W-1:0] cmp_epoch;
  logic               img_last, epoch_last;

  // The image counter is TST_W bits; training counts must fit as well.
  if (TRN_W > TST_W) begin : g_width_check
    $error("train_test_ctrl: MAX_TEST must be at least MAX_TRAIN");
  end

  always_comb begin
    img_idx    = train ? IMG_AW'(img_cnt) : IMG_AW'(MAX_TRAIN + 32'(img_cnt));
    img_last   = train ? (32'(img_cnt) == 32'(n_train) - 1) : (32'(img_cnt) == 32'(n_test) - 1);
    epoch_last = img_last && (!train || n_test == '0);
    more       = !(epoch_last && 32'(epoch) == 32'(n_epochs) - 1);
    fsm_start  = start && !busy && cfg_epochs != '0 && (cfg_train != '0 || cfg_test != '0);
    hit        = cmp_pending && (pred == cmp_label);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      train       <= 1'b0;
      n_train     <= '0;
      n_test      <= '0;
      n_epochs    <= '0;
      n_hidden    <= HSEL_W'(N);
      n_outputs   <= KSEL_W'(K);
      img_cnt     <= '0;
      epoch       <= '0;
      correct     <= '0;
      cmp_pending <= 1'b0;
      cmp_last    <= 1'b0;
      cmp_label   <= '0;
      cmp_epoch   <= '0;
      acc_valid   <= 1'b0;
      acc_count   <= '0;
      acc_epoch   <= '0;
    end else begin
      acc_valid <= 1'b0;

      if (fsm_start) begin
        busy     <= 1'b1;
        done     <= 1'b0;
        n_train  <= cfg_train;
        n_test   <= cfg_test;
        n_epochs <= cfg_epochs;
        n_hidden  <= (cfg_hidden == '0 || 32'(cfg_hidden) > N) ? HSEL_W'(N) : cfg_hidden;
        n_outputs <= (cfg_outputs < KSEL_W'(2) || 32'(cfg_outputs) > K) ? KSEL_W'(K) : cfg_outputs;
        train    <= (cfg_train != '0);
        img_cnt  <= '0;
        epoch    <= '0;
        correct  <= '0;
      end

      // Compare the finished test image's prediction with its label.
      cmp_pending <= 1'b0;
      if (cmp_pending) begin
        if (cmp_last) begin
          acc_valid <= 1'b1;
          acc_count <= correct + TST_W'(hit);
          acc_epoch <= cmp_epoch;
          correct   <= '0;
        end else begin
          correct   <= correct + TST_W'(hit);
        end
      end

      if (busy && state != ST_IDLE && img_done) begin
        if (!train) begin
          cmp_pending <= 1'b1;
          cmp_label   <= label;
          cmp_last    <= img_last;
          cmp_epoch   <= epoch;
        end
        if (img_last) begin
          img_cnt <= '0;
          if (train && n_test != '0) begin
            train <= 1'b0;
          end else begin
            train <= (n_train != '0);
            epoch <= epoch + 1'b1;
          end
        end else begin
          img_cnt <= img_cnt + 1'b1;
        end
      end

      // Finished: FSM back in idle and the last comparison made.
      if (busy && !fsm_start && state == ST_IDLE && !cmp_pending) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
