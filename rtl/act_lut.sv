// act_lut: sigmoid or tanh of a Q3.12 value by a 2048-entry lookup table.
//
// The activation functions of the LSTM tail are table lookups with 2048
// entries, as in the design. The table is addressed by the top 11 bits of the
// 16-bit Q3.12 input, i.e. the input range [-8, 8) is cut into 2048 steps of
// 1/128 and the table needs no clamping logic. Entry k (k read as a signed
// 11-bit number) holds round(4096 * f((k + 0.5) / 128)), f taken at the
// middle of its step. Each entry is an elaboration-time constant computed from
// the real-valued function, so synthesis sees a constant table (ROM). Step placement
// and rounding are this implementation's choice.
//
// Timing: one registered read, result valid one cycle after the input.
module act_lut
  import rnn_pkg::*;
#(
  parameter act_fn_e FUNC = ACT_SIGMOID
) (
  input  logic clk,
  input  fx_t  x,
  output fx_t  y
);

  localparam int unsigned DEPTH = 1 << LUT_AW;

  fx_t rom [DEPTH];

  function automatic fx_t entry(input int unsigned idx);
    int   k;
    real  v, f;
    k = (idx >= DEPTH / 2) ? int'(idx) - int'(DEPTH) : int'(idx);
    v = (real'(k) + 0.5) / real'(1 << (FX_FRAC - (FX_W - LUT_AW)));
    if (FUNC == ACT_SIGMOID) f = 1.0 / (1.0 + $exp(-v));
    else                     f = $tanh(v);
    return fx_t'($rtoi($floor(f * real'(1 << FX_FRAC) + 0.5)));
  endfunction

  // one elaboration-time constant per entry
  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    localparam fx_t VAL = entry(i);
    assign rom[i] = VAL;
  end

  always_ff @(posedge clk) y <= rom[x[FX_W-1 -: LUT_AW]];

endmodule
