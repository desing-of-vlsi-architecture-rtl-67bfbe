// weight_mem: dedicated weight memory of one neuron.
//
// DEPTH words of 16 bits: one weight per input of the neuron (784 for a
// hidden neuron, 32 for an output neuron). Reads are asynchronous, so a
// weight addressed by the state counter can be multiplied, updated and
// written back in the same cycle; the write happens at the rising clock edge
// when `we` is high. This lets a weight update sweep take one cycle per
// weight, as the design's cycle counts require. The memory is not reset:
// its contents are loaded by the host before training.
//
// One memory per neuron follows the design; asynchronous read (distributed
// RAM on an FPGA) is this implementation's choice to meet the cycle counts.
module weight_mem
  import ann_pkg::*;
#(
  parameter int DEPTH  = 784,
  parameter int ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  data_t             wdata,
  output data_t             rdata
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
