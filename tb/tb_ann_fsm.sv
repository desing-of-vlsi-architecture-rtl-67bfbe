// tb_ann_fsm: self-checking test of ann_fsm with M = 12 inputs, N = 5 hidden.
//
// Runs training and test images back to back, some of them with only part of
// the hidden layer in use (n_hid = 2 or 3 instead of 5), then stops. Checks the exact state and counter of every cycle against
// the expected schedule (S0 x1, S1 x M, S2 x n, [S3, S4 x n, S5 x M]),
// img_done on the last cycle of each image, the return to idle, and the image
// lengths 1 + 2M + 3n and 1 + M + n.
module tb_ann_fsm;
  import ann_pkg::*;

  localparam int M = 12, N = 5;
  logic clk = 0, rst_n = 0, start = 0, train = 0, more = 0;
  logic [3:0] n_hid = 4'(N);
  ann_state_t state;
  logic [3:0] cnt;
  logic last, img_done;
  int checks = 0, failures = 0;

  ann_fsm #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected schedule of one image
  task automatic expect_image(input bit is_train, input bit has_more, input int nh);
    ann_state_t st [6] = '{ST_S0, ST_S1, ST_S2, ST_S3, ST_S4, ST_S5};
    int len [6] = '{1, M, nh, nh, nh, M};
    int n_st = is_train ? 6 : 3;
    int cycles = 0;
    train = is_train;
    n_hid = 4'(nh);
    for (int s = 0; s < n_st; s++)
      for (int c = 0; c < len[s]; c++) begin
        more = has_more;
        #1;
        checks++;
        if (state != st[s] || cnt != 4'(c)) begin
          failures++;
          $display("FAIL expected S%0d cnt %0d, got state %0d cnt %0d", s, c, state, cnt);
        end
        checks++;
        if (img_done != (s == n_st - 1 && c == len[s] - 1)) begin
          failures++; $display("FAIL img_done wrong at S%0d cnt %0d", s, c);
        end
        cycles++;
        @(negedge clk);
      end
    checks++;
    if (cycles != (is_train ? 1 + 2*M + 3*nh : 1 + M + nh)) begin
      failures++; $display("FAIL image length %0d", cycles);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (state != ST_IDLE) begin failures++; $display("FAIL not idle after reset"); end
    start = 1; @(negedge clk); start = 0;
    expect_image(1'b1, 1'b1, N);
    expect_image(1'b0, 1'b1, N);
    expect_image(1'b1, 1'b1, 2);   // part of the hidden layer in use
    expect_image(1'b0, 1'b1, 3);
    expect_image(1'b1, 1'b0, N);
    #1;
    checks++; if (state != ST_IDLE) begin failures++; $display("FAIL not idle at end"); end
    repeat (3) @(negedge clk);
    checks++; if (state != ST_IDLE) begin failures++; $display("FAIL left idle without start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
