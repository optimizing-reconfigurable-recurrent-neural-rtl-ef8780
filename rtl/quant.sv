// quant: 16-bit fixed-point hidden values to 8-bit quantized values.
//
// The new hidden vector must be quantized before the kernels can use it as
// part of the next input vector. With r = S (q - z): q = r / S + z. The
// reciprocal scale is an unsigned fixed-point multiplier with a right shift:
// q = clamp(((h * q_mult) >>> q_shift) + zx, 0, 255) (floor). h_t and x_t
// share one scale and zero point (zx) so that [x_t, h_{t-1}] is one vector;
// that sharing is this implementation's choice.
//
// Interface: LANES values per cycle. Timing: one register stage.
module quant
  import rnn_pkg::*;
#(
  parameter int unsigned LANES = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        q_mult,
  input  logic [4:0]         q_shift,
  input  q8_t                zx,
  input  logic               in_valid,
  input  fx_t  [LANES-1:0]   in_fx,
  output logic               out_valid,
  output q8_t  [LANES-1:0]   out_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [47:0] v;
      v = ((48'(in_fx[l]) * $signed({32'd0, q_mult})) >>> q_shift) + $signed(48'(zx));
      if (v < 0)              out_q[l] <= 8'd0;
      else if (v > 48'sd255)  out_q[l] <= 8'd255;
      else                    out_q[l] <= q8_t'(v[7:0]);
    end
  end

endmodule
