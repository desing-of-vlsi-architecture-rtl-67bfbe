// tb_adder_tree: self-checking test of adder_tree with ten operands.
//
// Random signed operands, including all-maximum and all-minimum, are summed
// here in 64-bit arithmetic and compared with the tree's result.
module tb_adder_tree;
  import ann_pkg::*;

  localparam int N_OPS = 10;
  logic signed [31:0] ops [N_OPS];
  logic signed [35:0] sum;
  int checks = 0, failures = 0;

  adder_tree #(.N_OPS(N_OPS), .IN_W(32), .OUT_W(36)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp;
    for (int t = 0; t < 502; t++) begin
      exp = 0;
      for (int i = 0; i < N_OPS; i++) begin
        if (t == 0)      ops[i] = 32'sh7fff_ffff;
        else if (t == 1) ops[i] = -32'sh8000_0000;
        else if (t < 250) ops[i] = 32'(int'($urandom % 20001) - 10000);
        else             ops[i] = 32'($urandom);
        exp += longint'(ops[i]);
      end
      #1;
      checks++;
      if (longint'(sum) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL test %0d: got %0d expected %0d", t, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
