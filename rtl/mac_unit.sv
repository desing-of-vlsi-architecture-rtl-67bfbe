// mac_unit: multiply-accumulate unit of one neuron.
//
// Multiplies two 16-bit fixed-point operands, scales the product back to 12
// fraction bits and adds it to a base operand chosen by base_sel: zero, the
// unit's own accumulator register, or an external value (the weight that is
// being updated). The sum is available combinationally on `sum` in the same
// cycle; the accumulator register takes it at the clock edge when `en` is
// high, and is cleared when `clr` is high (clr wins).
//
// Timing: one product per cycle, no pipeline. A dot product of length L takes
// L cycles and its result is on `acc` right after the L-th edge.
// Reset is active-low and synchronous to clk's rising edge.
//
// The multiply-add-register structure follows the design's MAC unit; the
// three-way choice of base operand is how this implementation realises the
// neuron's loadable register (zero, latched, or a weight word).
module mac_unit
  import ann_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,       // clear the accumulator
  input  logic      en,        // load `sum` into the accumulator
  input  base_sel_t base_sel,  // operand the product is added to
  input  acc_t      ext_base,  // external base operand (BASE_EXT)
  input  data_t     a,
  input  data_t     b,
  output acc_t      sum,       // base + a*b, combinational
  output acc_t      acc        // accumulator register
);

  acc_t base;

  always_comb begin
    unique case (base_sel)
      BASE_ACC: base = acc;
      BASE_EXT: base = ext_base;
      default:  base = '0;
    endcase
    sum = base + fx_mul(a, b);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) acc <= '0;
    else if (en)       acc <= sum;
  end

endmodule
