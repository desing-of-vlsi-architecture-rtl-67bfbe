// image_mem: input memory holding the training and test images and labels.
//
// N_IMG images of M pixels each, stored image after image (pixel p of image i
// at address i*M + p), plus one label per image. Pixels are 16-bit fixed-point
// words with 12 fraction bits (0.0 .. 1.0 for a grey level). Images
// 0 .. MAX_TRAIN-1 are the training set and the rest the test set; the
// controller forms the addresses. Writes (host loading) take effect at the
// rising clock edge; reads are asynchronous so that the pixel addressed by the
// state counter is available in the same cycle, which lets the network read
// one pixel per cycle with no extra latency. The memory is not reset.
//
// That images are held in an input memory loaded before training follows the
// design; the layout, the pixel format and asynchronous reads are this
// implementation's choices.
module image_mem
  import ann_pkg::*;
#(
  parameter int M       = 784,
  parameter int N_IMG   = 200,
  parameter int LBL_W   = 4,
  parameter int PIX_AW  = $clog2(M * N_IMG),
  parameter int IMG_AW  = (N_IMG > 1) ? $clog2(N_IMG) : 1
) (
  input  logic              clk,
  input  logic              pix_we,
  input  logic [PIX_AW-1:0] pix_waddr,
  input  data_t             pix_wdata,
  input  logic [PIX_AW-1:0] pix_raddr,
  output data_t             pix_rdata,
  input  logic              lbl_we,
  input  logic [IMG_AW-1:0] lbl_waddr,
  input  logic [LBL_W-1:0]  lbl_wdata,
  input  logic [IMG_AW-1:0] lbl_raddr,
  output logic [LBL_W-1:0]  lbl_rdata
);

  data_t            pix [M * N_IMG];
  logic [LBL_W-1:0] lbl [N_IMG];

  always_ff @(posedge clk) begin
    if (pix_we) pix[pix_waddr] <= pix_wdata;
    if (lbl_we) lbl[lbl_waddr] <= lbl_wdata;
  end

  assign pix_rdata = pix[pix_raddr];
  assign lbl_rdata = lbl[lbl_raddr];

endmodule
