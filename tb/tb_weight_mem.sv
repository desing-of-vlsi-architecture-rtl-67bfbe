// tb_weight_mem: self-checking test of weight_mem.
//
// Fills all 784 words with random values, reads them back asynchronously,
// then does read-modify-write in single cycles (as a weight update does) and
// checks that a write only changes the addressed word.
module tb_weight_mem;
  import ann_pkg::*;

  localparam int DEPTH = 784;
  logic clk = 0, we = 0;
  logic [9:0] addr = '0;
  data_t wdata = '0, rdata;
  data_t model [DEPTH];
  int checks = 0, failures = 0;

  weight_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0d: got %0d expected %0d", what, addr, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; addr = 10'(i); wdata = data_t'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      addr = 10'(i); #1;
      check("read", rdata, model[i]);
    end
    // read-modify-write sweep: w <= w + 3 in one cycle each
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = 10'(i); #1;
      we = 1; wdata = rdata + 16'sd3; model[i] = model[i] + 16'sd3;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = 10'(i); #1;
      check("after update", rdata, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
