// tb_ann_top_full: end-to-end test of ann_top at its default size.
//
// The 784 x 32 x 10 network is loaded with 100 training and 100 test images
// of a synthetic 10-class data set and trained for 10 epochs (stochastic
// gradient descent, learning rate 1/8), then checked against an integer
// reference model: every epoch's accuracy, every epoch's cycle count
// (248,200 cycles = 100 x 1665 + 100 x 817) and all 25,408 + 320 weights.
// A further epoch then runs on 16 hidden and 9 output neurons only, to
// exercise the partial use of the hardware at full size.
// The checks themselves are in ann_top_check.svh.
module tb_ann_top_full;
  localparam int M = 784, N = 32, K = 10;
  localparam int MAX_TRAIN = 100, MAX_TEST = 100;
  localparam int N_TRAIN = 100, N_TEST = 100, EPOCHS = 10;
  localparam bit HID_TANH = 1'b0, OUT_TANH = 1'b0;
  localparam int EPOCHS2 = 1, NH2 = 16, NO2 = 9;
  localparam int W1_RANGE = 900, W2_RANGE = 2000;
  localparam int MAX_CYCLES = 3000000;

  logic clk, rst_n;

  `include "ann_top_check.svh"

  ann_top dut (
    .clk, .rst_n, .start, .cfg_train, .cfg_test, .cfg_epochs, .cfg_hidden, .cfg_outputs,
    .busy, .done, .state, .hit, .acc_valid, .acc_count, .acc_epoch, .pred, .out_act, .lut_sat,
    .pix_we, .pix_waddr, .pix_wdata, .lbl_we, .lbl_waddr, .lbl_wdata,
    .w_we, .w_layer, .w_neuron, .w_addr, .w_wdata, .w_rdata
  );
endmodule
