// cnn_pkg: types, constants and arithmetic helpers shared by every layer
// engine of the CNN dataflow accelerator.
//
// Numbers are signed fixed point: DATA_W bits with FRAC fractional bits
// (Q7.8 by default). Products are formed at full width and accumulated in
// ACC_W bits; a layer saturates back to DATA_W only when it writes a point
// out. The original design used a user-configurable floating-point format;
// fixed point is this implementation's choice, made so that every datapath
// is plain synthesizable integer logic.
//
// Activation functions follow the hardware definitions of the design:
// ReLU clipped at a threshold of 10, sigmoid forced to 0 below -17.32 and
// tanh forced to 1 above 8.66. Inside those regions sigmoid and tanh use a
// piecewise-linear approximation (this implementation's choice; the original
// used an exponential unit).
package cnn_pkg;

  localparam int DATA_W = 16;
  localparam int FRAC   = 8;
  localparam int ACC_W  = 40;
  // LMem burst of 192 bytes holds 24 stream points in the original system.
  localparam int BURST_SIZE = 24;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  localparam data_t ONE      = data_t'(1 <<< FRAC);
  localparam data_t RELU_MAX = data_t'(10 <<< FRAC);
  localparam data_t DATA_MAX = data_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam data_t DATA_MIN = data_t'({1'b1, {(DATA_W-1){1'b0}}});
  // 17.32 and 8.66 rounded to the fixed-point grid
  localparam data_t SIG_LOW  = data_t'(-4434);
  localparam data_t TANH_HI  = data_t'(2217);

  typedef enum logic [1:0] {
    ACT_NONE    = 2'd0,
    ACT_RELU    = 2'd1,
    ACT_SIGMOID = 2'd2,
    ACT_TANH    = 2'd3
  } act_e;

  typedef enum logic {
    POOL_MAX  = 1'b0,
    POOL_MEAN = 1'b1
  } pool_e;

  // One point of a data stream (LMem or CPU stream)
  typedef struct packed {
    logic  valid;
    data_t data;
  } stream_t;

  // A write into a weight memory (FMem), issued by the host before a run
  typedef struct packed {
    logic        we;
    logic [15:0] addr;
    data_t       data;
  } fmem_wr_t;

  // Per-layer run controls issued by the host for each kernel call
  typedef struct packed {
    logic       start;      // pulse: begin a run
    logic       last_run;   // last run of the layer: pad output to a burst
    logic       first_in;   // fcon: first input tile, no partial sum to add
    logic       last_in;    // fcon: last input tile, apply the activation
    act_e       act;        // activation applied on output
    pool_e      pool_mode;  // max or mean pooling
    logic [1:0] run_units;  // conv: kernels (fprop) or channels (bprop) in this run
  } layer_ctrl_t;

  // Fixed-point product of two data points, kept at accumulator width
  function automatic acc_t fx_mul(input data_t a, input data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return acc_t'(p) >>> FRAC;
  endfunction

  // Saturate an accumulator value to a data point
  function automatic data_t fx_sat(input acc_t v);
    if (v > acc_t'(DATA_MAX)) return DATA_MAX;
    if (v < acc_t'(DATA_MIN)) return DATA_MIN;
    return data_t'(v);
  endfunction

  // Sigmoid: 0 below -17.32, otherwise a piecewise-linear approximation
  function automatic data_t fx_sigmoid(input data_t x);
    data_t ax, y;
    if (x <= SIG_LOW) return '0;
    ax = (x < 0) ? data_t'(-x) : x;
    if (ax >= data_t'(5 <<< FRAC))           y = ONE;
    else if (ax >= data_t'(608))             y = (ax >>> 5) + data_t'(216);  // 2.375 <= |x| < 5
    else if (ax >= data_t'(1 <<< FRAC))      y = (ax >>> 3) + data_t'(160);  // 1 <= |x| < 2.375
    else                                     y = (ax >>> 2) + data_t'(128);  // |x| < 1
    return (x < 0) ? data_t'(ONE - y) : y;
  endfunction

  // Tanh: 1 above 8.66, otherwise 2*sigmoid(2x) - 1
  function automatic data_t fx_tanh(input data_t x);
    data_t x2;
    if (x >= TANH_HI) return ONE;
    if (x >  data_t'(DATA_MAX >>> 1)) x2 = DATA_MAX;
    else if (x < data_t'(DATA_MIN >>> 1)) x2 = DATA_MIN;
    else x2 = data_t'(x <<< 1);
    return data_t'((fx_sigmoid(x2) <<< 1) - ONE);
  endfunction

  function automatic data_t fx_act(input act_e f, input data_t x);
    case (f)
      ACT_RELU:    return (x <= 0) ? data_t'(0) : ((x > RELU_MAX) ? RELU_MAX : x);
      ACT_SIGMOID: return fx_sigmoid(x);
      ACT_TANH:    return fx_tanh(x);
      default:     return x;
    endcase
  endfunction

  // Derivative of the activation, evaluated from the layer's forward output y
  function automatic data_t fx_act_deriv(input act_e f, input data_t y);
    case (f)
      ACT_RELU:    return (y > 0) ? ONE : data_t'(0);
      ACT_SIGMOID: return fx_sat(fx_mul(y, data_t'(ONE - y)));
      ACT_TANH:    return fx_sat(acc_t'(ONE) - fx_mul(y, y));
      default:     return ONE;
    endcase
  endfunction

endpackage
