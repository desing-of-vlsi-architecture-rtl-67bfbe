// ann_fsm: six-state controller of the back-propagation datapath.
//
// For every image the FSM walks through the design's processing states and
// drives a step counter `cnt` that addresses weights, pixels and hidden
// activations:
//   S0  1 cycle      load input, clear accumulators
//   S1  M cycles     hidden layer forward pass, cnt = pixel index
//   S2  n cycles     output layer forward pass, cnt = hidden index
//   S3  n cycles     output layer weight update, cnt = hidden index
//   S4  n cycles     hidden layer error, cnt = hidden index
//   S5  M cycles     hidden layer weight update, cnt = pixel index
// where n = n_hid is the number of hidden neurons in use (N when the whole
// layer is used). A training image (train=1) takes all six states,
// 1 + 2M + 3n cycles (1665 for 784x32x10); a test image (train=0) ends after
// S2, 1 + M + n cycles (817). On the last cycle of an image `img_done` is high; if `more`
// is high then, the next cycle is S0 of the next image, so consecutive images
// run back to back with no idle cycle. Otherwise the FSM returns to ST_IDLE
// and waits for `start`.
//
// `train` and `n_hid` (1..N) must be held stable for the whole image. `last` is high on the last
// cycle of every state. Reset (active-low, synchronous) puts the FSM in idle.
//
// The state sequence and the per-state cycle counts follow the design (its
// 816 forward and 848 backward cycles); the idle state, the one-cycle S0 and
// the back-to-back image handshake are this implementation's choices.
module ann_fsm
  import ann_pkg::*;
#(
  parameter int M     = 784,   // inputs
  parameter int N     = 32,    // hidden neurons
  parameter int CNT_W = $clog2((M > N) ? M : N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,     // begin an image from idle
  input  logic             train,     // current image is a training image
  input  logic             more,      // another image follows this one
  input  logic [CNT_W-1:0] n_hid,     // active hidden neurons, 1..N
  output ann_state_t       state,
  output logic [CNT_W-1:0] cnt,
  output logic             last,      // last cycle of the current state
  output logic             img_done   // last cycle of the current image
);

  ann_state_t next_state;

  always_comb begin
    unique case (state)
      ST_S1, ST_S5:        last = (cnt == CNT_W'(M - 1));
      ST_S2, ST_S3, ST_S4: last = (cnt == n_hid - 1'b1);
      ST_S0:               last = 1'b1;
      default:             last = 1'b0;
    endcase

    img_done   = last && (state == ST_S5 || (state == ST_S2 && !train));
    next_state = state;
    if (state == ST_IDLE) begin
      if (start) next_state = ST_S0;
    end else if (img_done) begin
      next_state = more ? ST_S0 : ST_IDLE;
    end else if (last) begin
      unique case (state)
        ST_S0:   next_state = ST_S1;
        ST_S1:   next_state = ST_S2;
        ST_S2:   next_state = ST_S3;
        ST_S3:   next_state = ST_S4;
        ST_S4:   next_state = ST_S5;
        default: next_state = ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      state <= next_state;
      cnt   <= (last || state == ST_IDLE) ? '0 : cnt + 1'b1;
    end
  end

  // The counter never runs past the length of a state.
  a_cnt_range : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_S2 || state == ST_S3 || state == ST_S4) |-> cnt < n_hid && n_hid <= CNT_W'(N));
  a_cnt_range_m : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_S1 || state == ST_S5) |-> cnt < CNT_W'(M));

endmodule
