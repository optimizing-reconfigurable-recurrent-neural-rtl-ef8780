// rnn_pkg: types and constants shared by the column-wise LSTM engine.
//
// Number formats. Weights, inputs x_t and the fed-back hidden vector h_t are
// 8-bit unsigned integers with a zero point (r = S * (q - z)). Products are
// 16 bits wide, accumulators 32 bits, and everything after de-quantization
// (gate pre-activations, sigmoid/tanh outputs, cell state c_t, hidden value
// h_t) is 16-bit signed fixed point with FX_FRAC fractional bits (Q3.12,
// range [-8, 8)). These widths follow the 8/16/32-bit scheme of the design;
// the Q3.12 split is this implementation's choice.
package rnn_pkg;

  localparam int unsigned Q_W    = 8;   // quantized operand width
  localparam int unsigned PROD_W = 16;  // PE product width
  localparam int unsigned ACC_W  = 32;  // accumulator width
  localparam int unsigned FX_W   = 16;  // fixed-point width after de-quantization
  localparam int unsigned FX_FRAC = 12; // fractional bits of the fixed-point format
  localparam int unsigned LUT_AW = 11;  // 2048-entry activation tables

  // Gate order inside each group of four interlaced weight-matrix rows.
  localparam int unsigned GATE_I = 0;
  localparam int unsigned GATE_F = 1;
  localparam int unsigned GATE_G = 2;
  localparam int unsigned GATE_O = 3;
  localparam int unsigned NGATES = 4;

  typedef logic [Q_W-1:0]            q8_t;
  typedef logic [PROD_W-1:0]         prod_t;
  typedef logic signed [ACC_W-1:0]   acc_t;
  typedef logic signed [FX_W-1:0]    fx_t;

  typedef enum logic {ACT_SIGMOID = 1'b0, ACT_TANH = 1'b1} act_fn_e;

  // Run-time configuration of one sequence (one LSTM layer, TS timesteps).
  typedef struct packed {
    logic [15:0] lx;        // input vector length, multiple of EP
    logic [15:0] lh;        // hidden vector length, multiple of EP and NTAIL
    logic [15:0] ts;        // number of timesteps, >= 1
    logic [7:0]  zx;        // zero point of x_t and h_t
    logic [7:0]  zw;        // zero point of the weights
    logic [15:0] dq_mult;   // de-quantization multiplier, unsigned
    logic [4:0]  dq_shift;  // de-quantization right shift
    logic [15:0] q_mult;    // quantization multiplier (1/S_h in fixed point)
    logic [4:0]  q_shift;   // quantization right shift
  } rnn_cfg_t;

  // Saturate a wide signed value to the 16-bit fixed-point range.
  function automatic fx_t sat_fx(input logic signed [47:0] v);
    if (v > 48'sd32767)       return fx_t'(16'sh7fff);
    else if (v < -48'sd32768) return fx_t'(16'sh8000);
    else                      return fx_t'(v[15:0]);
  endfunction

  // Fixed-point product of two Q3.12 values, truncated back to Q3.12 (floor).
  function automatic logic signed [47:0] fx_mul(input fx_t a, input fx_t b);
    logic signed [31:0] p;
    p = a * b;
    return 48'(p >>> FX_FRAC);
  endfunction

endpackage
