// argmax: index of the largest of N_IN signed words (the predicted class).
//
// A combinational linear scan; on a tie the lowest index wins. Used to turn
// the output layer's activations into a digit so that it can be compared with
// the label of a test image. Choosing the largest activation as the network's
// answer is the usual reading of "the output is compared with the desired
// output"; the tie rule is this implementation's choice.
module argmax
  import ann_pkg::*;
#(
  parameter int N_IN  = 10,
  parameter int IDX_W = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  data_t             vals [N_IN],
  output logic [IDX_W-1:0]  idx,
  output data_t             max_val
);

  always_comb begin
    idx     = '0;
    max_val = vals[0];
    for (int i = 1; i < N_IN; i++) begin
      if (vals[i] > max_val) begin
        max_val = vals[i];
        idx     = IDX_W'(i);
      end
    end
  end

endmodule
