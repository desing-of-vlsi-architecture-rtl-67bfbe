// tb_mac_unit: self-checking test of mac_unit.
//
// Drives random operands with each base selection (zero, accumulator,
// external), checks the combinational sum against base + floor(a*b/4096)
// computed here, and checks the accumulator after a 50-step dot product,
// after hold cycles (en low) and after clear.
module tb_mac_unit;
  import ann_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  base_sel_t base_sel = BASE_ZERO;
  acc_t ext_base = '0, sum, acc;
  data_t a = '0, b = '0;
  int checks = 0, failures = 0;
  longint model_acc;

  mac_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint prod(data_t x, data_t y);
    return (longint'(x) * longint'(y)) >>> 12;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check("acc after reset", acc, 0);

    // dot product of length 50 with accumulation
    model_acc = 0;
    base_sel = BASE_ACC; en = 1;
    for (int i = 0; i < 50; i++) begin
      a = data_t'($urandom); b = data_t'($urandom);
      #1;
      check("sum (acc base)", sum, model_acc + prod(a, b));
      model_acc += prod(a, b);
      @(negedge clk);
    end
    en = 0;
    check("acc after dot product", acc, acc_t'(model_acc));

    // hold
    a = 16'sd4096; b = 16'sd4096;
    repeat (3) @(negedge clk);
    check("acc held", acc, acc_t'(model_acc));

    // zero and external bases
    for (int i = 0; i < 40; i++) begin
      a = data_t'($urandom); b = data_t'($urandom);
      ext_base = acc_t'(int'($urandom % 65536) - 32768);
      base_sel = BASE_ZERO; #1;
      check("sum (zero base)", sum, prod(a, b));
      base_sel = BASE_EXT; #1;
      check("sum (ext base)", sum, longint'(ext_base) + prod(a, b));
    end
    // a signed corner: -1.0 * 0.5
    a = -16'sd4096; b = 16'sd2048; base_sel = BASE_ZERO; #1;
    check("negative product", sum, -2048);

    // clear wins over enable
    clr = 1; en = 1; @(negedge clk); clr = 0; en = 0;
    check("acc cleared", acc, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
