// ann_pkg: types and constants shared by the back-propagation network.
//
// Numbers are 16-bit two's-complement fixed point with 12 fraction bits
// (range -8.0 .. +7.9998, step 1/4096). Weighted sums are kept in a 32-bit
// accumulator with the same binary point, so a long dot product cannot
// overflow before it reaches the activation table. The 16-bit word follows
// the design; the split into 4 integer and 12 fraction bits, the accumulator
// width and the rounding rules (truncation toward minus infinity after each
// product, saturation when a result is written back to a 16-bit word) are
// this implementation's own choices.
//
// The six processing states follow the design's state table:
//   S0 load input / clear, S1 hidden forward, S2 output forward,
//   S3 output weight update, S4 hidden error, S5 hidden weight update.
// ST_IDLE is added so the weight and image memories can be loaded and read
// back by a host between runs.
package ann_pkg;

  localparam int DATA_W = 16;               // word width of weights, pixels, activations
  localparam int FRAC   = 12;               // fraction bits
  localparam int ACC_W  = 32;               // accumulator width, same binary point
  localparam int LR_SHIFT = 3;              // learning rate 0.125 = 2^-3

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  localparam data_t ONE = data_t'(1 << FRAC);

  typedef enum logic [2:0] {
    ST_S0   = 3'd0,   // load input, clear registers
    ST_S1   = 3'd1,   // forward propagation, hidden layer
    ST_S2   = 3'd2,   // forward propagation, output layer
    ST_S3   = 3'd3,   // weight update, output layer
    ST_S4   = 3'd4,   // error calculation, hidden layer
    ST_S5   = 3'd5,   // weight update, hidden layer
    ST_IDLE = 3'd7    // waiting for start; host access to memories
  } ann_state_t;

  // Activation function of a layer (chosen per layer at elaboration).
  typedef enum logic {
    ACT_SIGMOID = 1'b0,   // 1 / (1 + e^-x),      range 0..1
    ACT_TANH    = 1'b1    // (1 - e^-2x)/(1 + e^-2x), range -1..1
  } act_fn_t;

  // Operand that the MAC adds its product to (the neuron's loadable register).
  typedef enum logic [1:0] {
    BASE_ZERO = 2'd0, // product only
    BASE_ACC  = 2'd1, // running sum (accumulate)
    BASE_EXT  = 2'd2  // external value, the weight being updated
  } base_sel_t;

  // Saturate an accumulator-width value to a 16-bit word.
  function automatic data_t sat16(input acc_t v);
    localparam acc_t MAXV = acc_t'((1 << (DATA_W-1)) - 1);
    localparam acc_t MINV = -acc_t'(1 << (DATA_W-1));
    if (v > MAXV)      return data_t'(MAXV);
    else if (v < MINV) return data_t'(MINV);
    else               return data_t'(v);
  endfunction

  // Fixed-point product of two words, scaled back to FRAC fraction bits.
  function automatic acc_t fx_mul(input data_t a, input data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return acc_t'(p >>> FRAC);
  endfunction

endpackage
