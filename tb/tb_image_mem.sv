// tb_image_mem: self-checking test of image_mem with a small image set.
//
// Writes 6 images of 20 pixels and their labels, then reads every pixel and
// label back with asynchronous reads and compares them with the values
// written.
module tb_image_mem;
  import ann_pkg::*;

  localparam int M = 20, N_IMG = 6;
  logic clk = 0, pix_we = 0, lbl_we = 0;
  logic [6:0] pix_waddr = '0, pix_raddr = '0;
  data_t pix_wdata = '0, pix_rdata;
  logic [2:0] lbl_waddr = '0, lbl_raddr = '0;
  logic [3:0] lbl_wdata = '0, lbl_rdata;
  data_t px [M*N_IMG];
  logic [3:0] lb [N_IMG];
  int checks = 0, failures = 0;

  image_mem #(.M(M), .N_IMG(N_IMG), .LBL_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < M*N_IMG; i++) begin
      @(negedge clk);
      pix_we = 1; pix_waddr = 7'(i); pix_wdata = data_t'($urandom % 4097); px[i] = pix_wdata;
    end
    for (int n = 0; n < N_IMG; n++) begin
      @(negedge clk);
      pix_we = 0; lbl_we = 1; lbl_waddr = 3'(n); lbl_wdata = 4'($urandom % 10); lb[n] = lbl_wdata;
    end
    @(negedge clk); lbl_we = 0;
    for (int n = 0; n < N_IMG; n++) begin
      lbl_raddr = 3'(n);
      for (int i = 0; i < M; i++) begin
        pix_raddr = 7'(n*M + i); #1;
        checks++;
        if (pix_rdata != px[n*M + i]) begin
          failures++; $display("FAIL pixel %0d of image %0d", i, n);
        end
      end
      checks++;
      if (lbl_rdata != lb[n]) begin failures++; $display("FAIL label %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
