// lstm_ref_pkg: bit-exact reference arithmetic for the LSTM engine testbenches.
//
// Integer/real models of the number formats used by the RTL, written
// independently of it: Q3.12 saturation and truncating products, the
// 2048-entry sigmoid/tanh tables (input step 1/128, value taken at the middle
// of the step, rounded to Q3.12), de-quantization and quantization.
package lstm_ref_pkg;

  function automatic int sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // floor(a*b / 4096) saturated
  function automatic int fmul(input int a, input int b);
    longint p;
    p = longint'(a) * longint'(b);
    return sat16(p >>> 12);
  endfunction

  function automatic int lut(input bit is_tanh, input int x);
    int  k;
    real v, f;
    k = x >>> 5;                     // x is in [-32768, 32767]
    v = (real'(k) + 0.5) / 128.0;
    f = is_tanh ? ($exp(v) - $exp(-v)) / ($exp(v) + $exp(-v)) : 1.0 / (1.0 + $exp(-v));
    return int'($floor(f * 4096.0 + 0.5));
  endfunction

  function automatic int sigm(input int x); return lut(1'b0, x); endfunction
  function automatic int tnh(input int x);  return lut(1'b1, x); endfunction

  function automatic int dequant(input longint acc, input int mult, input int shift, input int bias);
    longint s;
    s = (acc * longint'(mult)) >>> shift;
    return sat16(longint'(sat16(s)) + longint'(bias));
  endfunction

  function automatic int quant(input int h, input int mult, input int shift, input int zx);
    longint v;
    v = ((longint'(h) * longint'(mult)) >>> shift) + longint'(zx);
    if (v < 0) return 0;
    if (v > 255) return 255;
    return int'(v);
  endfunction

endpackage
