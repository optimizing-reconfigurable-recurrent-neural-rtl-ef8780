// lstm_tail: element-wise part of the LSTM cell for one hidden element.
//
// Takes the four de-quantized gate pre-activations of hidden element j (the
// four interlaced rows 4j..4j+3 of the combined matrix, order i, f, g, o) and
// computes
//     c_t = sigmoid(f) * c_{t-1} + sigmoid(i) * tanh(g)
//     h_t = sigmoid(o) * tanh(c_t)
// in 16-bit Q3.12 fixed point with 16-bit multipliers and adders (products
// truncated, sums saturated). The cell state c_{t-1} of every element this
// tail serves is kept in a local memory addressed by in_addr; in_first marks
// the first timestep, where c_{t-1} = 0. Activations use the 2048-entry
// tables of act_lut (three sigmoid, two tanh).
//
// The engine drives NTAIL of these tails side by side, element j going to
// tail j mod NTAIL at address j / NTAIL. Fixed pipeline registers keep the
// operands aligned; the pipeline structure is this implementation's choice.
//
// Timing: fully pipelined, one element per cycle, latency 4 cycles
// (in_valid in cycle n, out_valid in cycle n + 4).
module lstm_tail
  import rnn_pkg::*;
#(
  parameter int unsigned CDEPTH = 96,
  localparam int unsigned AW    = (CDEPTH > 1) ? $clog2(CDEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic [AW-1:0] in_addr,
  input  fx_t           in_i,
  input  fx_t           in_f,
  input  fx_t           in_g,
  input  fx_t           in_o,
  output logic          out_valid,
  output fx_t           out_h,
  output fx_t           out_c
);

  fx_t cmem [CDEPTH];

  // ---- stage 0 -> 1: activations, read c_{t-1}
  fx_t si, sf, tg, so;
  act_lut #(.FUNC(ACT_SIGMOID)) u_si (.clk(clk), .x(in_i), .y(si));
  act_lut #(.FUNC(ACT_SIGMOID)) u_sf (.clk(clk), .x(in_f), .y(sf));
  act_lut #(.FUNC(ACT_TANH))    u_tg (.clk(clk), .x(in_g), .y(tg));
  act_lut #(.FUNC(ACT_SIGMOID)) u_so (.clk(clk), .x(in_o), .y(so));

  fx_t           c_prev1;
  logic [AW-1:0] addr1, addr2;
  logic          v1, v2, v3;

  always_ff @(posedge clk) begin
    c_prev1 <= in_first ? fx_t'(0) : cmem[in_addr];
    addr1   <= in_addr;
  end

  // ---- stage 1 -> 2: the two products
  fx_t fc2, ig2, so2;
  always_ff @(posedge clk) begin
    fc2   <= sat_fx(fx_mul(sf, c_prev1));
    ig2   <= sat_fx(fx_mul(si, tg));
    so2   <= so;
    addr2 <= addr1;
  end

  // ---- stage 2: new cell state, written back, and its tanh
  fx_t c_new2, tc3, so3, c3;
  assign c_new2 = sat_fx(48'(fc2) + 48'(ig2));

  always_ff @(posedge clk) begin
    if (v2) cmem[addr2] <= c_new2;
  end

  act_lut #(.FUNC(ACT_TANH)) u_tc (.clk(clk), .x(c_new2), .y(tc3));

  always_ff @(posedge clk) begin
    so3 <= so2;
    c3  <= c_new2;
  end

  // ---- stage 3 -> 4: h_t
  always_ff @(posedge clk) begin
    out_h <= sat_fx(fx_mul(so3, tc3));
    out_c <= c3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2; out_valid <= v3;
    end
  end

endmodule
