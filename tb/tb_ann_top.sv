// tb_ann_top: end-to-end test of ann_top at reduced size.
//
// A 24 x 6 x 4 network (tanh hidden layer, sigmoid output layer) with 8
// training and 8 test images is trained for 6 epochs on a synthetic data set,
// then for 2 more epochs on 3 hidden and 3 output neurons only. It is
// checked against an integer reference model: every epoch's accuracy and
// cycle count, and every weight after training. The checks themselves are in ann_top_check.svh.
module tb_ann_top;
  localparam int M = 24, N = 6, K = 4;
  localparam int MAX_TRAIN = 8, MAX_TEST = 8;
  localparam int N_TRAIN = 8, N_TEST = 8, EPOCHS = 6;
  localparam bit HID_TANH = 1'b1, OUT_TANH = 1'b0;
  localparam int EPOCHS2 = 2, NH2 = 3, NO2 = 3;
  localparam int W1_RANGE = 1500, W2_RANGE = 3000;
  localparam int MAX_CYCLES = 200000;

  logic clk, rst_n;

  `include "ann_top_check.svh"

  ann_top #(.M(M), .N(N), .K(K), .MAX_TRAIN(MAX_TRAIN), .MAX_TEST(MAX_TEST),
            .HID_ACT(ACT_TANH)) dut (
    .clk, .rst_n, .start, .cfg_train, .cfg_test, .cfg_epochs, .cfg_hidden, .cfg_outputs,
    .busy, .done, .state, .hit, .acc_valid, .acc_count, .acc_epoch, .pred, .out_act, .lut_sat,
    .pix_we, .pix_waddr, .pix_wdata, .lbl_we, .lbl_waddr, .lbl_wdata,
    .w_we, .w_layer, .w_neuron, .w_addr, .w_wdata, .w_rdata
  );
endmodule
