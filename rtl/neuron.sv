// neuron: one neuron of the network, for either the hidden or the output layer.
//
// A neuron holds its own weight memory, a MAC unit, an activation table and
// the logic that decides, per processing state, what the MAC computes and
// where its result goes (the "conditional block"):
//
//   state  hidden neuron (IS_OUTPUT=0)        output neuron (IS_OUTPUT=1)
//   S0     clear accumulator                  clear accumulator
//   S1     acc += x[cnt] * w[cnt]             hold
//   S2     hold                               acc += h[cnt] * w[cnt]
//   S3     hold                               w[cnt] += h[cnt] * -(delta>>>3)
//   S4     capture error when err_we          psum = delta * w[cnt] (to adder)
//   S5     w[cnt] += x[cnt] * -(delta>>>3)    hold
//
// The accumulator keeps the weighted sum from the end of the forward state
// until the next S0, so the activation `act` and its derivative `der` (from
// the table) stay valid during all later states. The error block gives
// delta = e * der, with e = act - d for an output neuron (d is the desired
// output) and e = the captured hidden error for a hidden neuron. The learning
// rate 1/8 is applied by an arithmetic right shift of delta before the
// multiplication, and the weight is decreased because e is output minus
// desired.
//
// Interface: `x_in` is the broadcast input of the current step (a pixel for
// the hidden layer, a hidden activation for the output layer); `addr` is the
// weight address (the state counter while running, a host address in idle).
// A neuron whose `active` input is low (not part of the configured network)
// never updates its weights. The host writes a weight with ext_we, allowed only in ST_IDLE, and reads
// it on `w_rdata`. All updates happen at the rising clock edge; everything
// else is combinational, so a weight is read, updated and written back in
// one cycle.
//
// The per-state role of the loadable register and the output routing follow
// the design, as does the per-neuron choice of activation (ACT); keeping
// the hidden accumulator (instead of clearing it) in S4
// so that the derivative is still available at the end of S4 is this
// implementation's choice, as are the rounding and saturation rules.
module neuron
  import ann_pkg::*;
#(
  parameter int DEPTH     = 784,
  parameter bit IS_OUTPUT = 1'b0,
  parameter act_fn_t ACT  = ACT_SIGMOID,   // activation of this neuron
  parameter int ADDR_W    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ann_state_t        state,
  input  logic              active,    // neuron in use; no weight writes if low
  input  logic [ADDR_W-1:0] addr,
  input  data_t             x_in,      // broadcast operand of this step
  input  data_t             d_in,      // desired output (output layer)
  input  logic              err_we,    // capture err_in (hidden layer, S4)
  input  data_t             err_in,    // back-propagated error (hidden layer)
  input  logic              ext_we,    // host weight write (idle only)
  input  data_t             ext_wdata,
  output data_t             w_rdata,   // weight at addr
  output data_t             act,       // activation of the current sum
  output data_t             der,       // derivative of the activation
  output data_t             delta,     // local gradient e * der
  output acc_t              psum,      // MAC result, to the multi-operand adder
  output acc_t              acc,       // weighted sum
  output logic              lut_sat    // weighted sum beyond the table range
);

  localparam ann_state_t FWD_ST = IS_OUTPUT ? ST_S2 : ST_S1;
  localparam ann_state_t UPD_ST = IS_OUTPUT ? ST_S3 : ST_S5;

  data_t     w;
  data_t     err;          // error entering the error block
  data_t     err_q;        // captured hidden error
  data_t     step;         // -(delta >>> LR_SHIFT)
  data_t     mac_a, mac_b;
  base_sel_t base_sel;
  logic      acc_en, acc_clr, upd_we;
  acc_t      sum;

  // ---- weight memory ------------------------------------------------------
  weight_mem #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_mem (
    .clk   (clk),
    .we    (upd_we || ext_we),
    .addr  (addr),
    .wdata (ext_we ? ext_wdata : sat16(sum)),
    .rdata (w)
  );
  assign w_rdata = w;

  // ---- activation table ---------------------------------------------------
  act_lut #(.ACT(ACT)) u_lut (.x(acc), .f(act), .df(der), .sat(lut_sat));

  // ---- error block --------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n)      err_q <= '0;
    else if (err_we) err_q <= err_in;
  end

  assign err   = IS_OUTPUT ? data_t'(act - d_in) : err_q;
  assign delta = sat16(fx_mul(err, der));
  assign step  = data_t'(-(delta >>> LR_SHIFT));

  // ---- conditional block: MAC operands and result routing ---------------
  always_comb begin
    base_sel = BASE_ZERO;
    mac_a    = x_in;
    mac_b    = w;
    acc_en   = 1'b0;
    upd_we   = 1'b0;
    acc_clr  = (state == ST_S0);
    if (state == FWD_ST) begin
      base_sel = BASE_ACC;
      acc_en   = 1'b1;
    end else if (state == UPD_ST) begin
      base_sel = BASE_EXT;
      mac_b    = step;
      upd_we   = active;
    end else if (IS_OUTPUT && state == ST_S4) begin
      mac_a    = delta;
    end
  end

  mac_unit u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (acc_clr),
    .en       (acc_en),
    .base_sel (base_sel),
    .ext_base (acc_t'(w)),
    .a        (mac_a),
    .b        (mac_b),
    .sum      (sum),
    .acc      (acc)
  );

  assign psum = sum;

  // Host writes only while the network is idle.
  a_ext_we_idle : assert property (@(posedge clk) disable iff (!rst_n)
    ext_we |-> state == ST_IDLE);

endmodule
