// act_lut: activation look-up table with its derivative.
//
// The activation is chosen by the ACT parameter: the logistic sigmoid
// (default) or the hyperbolic tangent. The table is addressed with the
// magnitude of the weighted sum, so only the non-negative half of the curve
// is stored; the sign is applied afterwards using the curve's symmetry:
//   sigmoid: f(-x) = 1 - f(x),  f'(x) = f(x) * (1 - f(x))
//   tanh:    f(-x) = -f(x),     f'(x) = 1 - f(x)^2
// and in both cases f'(-x) = f'(x).
// Entry i holds f(i / 2^STEP_BITS) rounded to 12 fraction bits; magnitudes at
// or beyond DEPTH / 2^STEP_BITS (8.0 with the defaults) use the last entry,
// so the curve saturates there. Both outputs are purely combinational:
// the result is ready in the same cycle the sum is.
//
// The table contents are computed at elaboration by a constant function, so
// no data file is needed. That activation and derivative come from one table
// addressed by the magnitude, and that the activation can be chosen, follow
// the design; the choice of sigmoid and tanh as the two curves, the table
// depth (256),
// step (1/32) and the rounding are this implementation's choices.
module act_lut
  import ann_pkg::*;
#(
  parameter act_fn_t ACT  = ACT_SIGMOID,
  parameter int ADDR_W    = 8,   // log2 of table depth
  parameter int STEP_BITS = 5    // table step is 2^-STEP_BITS
) (
  input  acc_t  x,       // weighted sum, FRAC fraction bits
  output data_t f,       // f(x)
  output data_t df,      // f'(x)
  output logic  sat      // |x| beyond the table range
);

  localparam int DEPTH = 1 << ADDR_W;
  typedef data_t tbl_t [DEPTH];

  function automatic tbl_t mk_table(input bit deriv);
    tbl_t t;
    real  xv, s;
    for (int i = 0; i < DEPTH; i++) begin
      xv = real'(i) / real'(1 << STEP_BITS);
      if (ACT == ACT_TANH) begin
        s = (1.0 - $exp(-2.0 * xv)) / (1.0 + $exp(-2.0 * xv));
        if (deriv) s = 1.0 - s * s;
      end else begin
        s = 1.0 / (1.0 + $exp(-xv));
        if (deriv) s = s * (1.0 - s);
      end
      t[i] = data_t'($rtoi(s * real'(1 << FRAC) + 0.5));
    end
    return t;
  endfunction

  localparam tbl_t SIG_T = mk_table(1'b0);
  localparam tbl_t DER_T = mk_table(1'b1);

  logic              neg;
  logic [ACC_W-1:0]  mag;
  logic [ACC_W-1:0]  idx_full;
  logic [ADDR_W-1:0] idx;

  always_comb begin
    neg      = x[ACC_W-1];
    mag      = neg ? ACC_W'(-x) : ACC_W'(x);
    idx_full = mag >> (FRAC - STEP_BITS);
    sat      = idx_full >= ACC_W'(DEPTH);
    idx      = sat ? ADDR_W'(DEPTH - 1) : idx_full[ADDR_W-1:0];
    if (ACT == ACT_TANH) f = neg ? data_t'(-SIG_T[idx])      : SIG_T[idx];
    else                 f = neg ? data_t'(ONE - SIG_T[idx]) : SIG_T[idx];
    df       = DER_T[idx];
  end

endmodule
