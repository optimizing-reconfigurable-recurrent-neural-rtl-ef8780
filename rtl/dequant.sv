// dequant: integer MVM results to 16-bit fixed point, plus gate bias.
//
// With r = S (q - z), a compensated dot product sum((w - zw)(x - zx)) equals
// the real dot product divided by S_w * S_x. The de-quantizer multiplies it by
// the combined scale, given as an unsigned fixed-point multiplier and a right
// shift (y = (acc * dq_mult) >>> dq_shift, floor), saturates it to Q3.12 and
// adds the bias of its weight-matrix row from a local bias table, again
// saturating. The multiplier/shift form of the scale and adding the bias here
// are this implementation's choices.
//
// Interface: LANES results per cycle, the lanes of one output group being
// consecutive rows (row = grp * LANES + lane). The bias table has one write
// port (b_we, b_row, b_val). Timing: one register stage, latency 1 cycle.
module dequant
  import rnn_pkg::*;
#(
  parameter int unsigned LANES   = 64,
  parameter int unsigned MAX_ROWS = 6144,
  localparam int unsigned NGRP   = (MAX_ROWS + LANES - 1) / LANES,
  localparam int unsigned GW     = (NGRP > 1) ? $clog2(NGRP) : 1,
  localparam int unsigned RW     = $clog2(MAX_ROWS + 1),
  localparam int unsigned LW     = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [15:0]          dq_mult,
  input  logic [4:0]           dq_shift,
  // bias loading
  input  logic                 b_we,
  input  logic [RW-1:0]        b_row,
  input  fx_t                  b_val,
  // data
  input  logic                 in_valid,
  input  logic [GW-1:0]        in_grp,
  input  acc_t [LANES-1:0]     in_acc,
  output logic                 out_valid,
  output logic [GW-1:0]        out_grp,
  output fx_t  [LANES-1:0]     out_fx
);

  fx_t bias [NGRP][LANES];

  always_ff @(posedge clk) begin
    if (b_we) bias[GW'(b_row / RW'(LANES))][LW'(b_row % RW'(LANES))] <= b_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_grp   <= '0;
    end else begin
      out_valid <= in_valid;
      out_grp   <= in_grp;
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [47:0] scaled;
      scaled = (48'(in_acc[l]) * $signed({32'd0, dq_mult})) >>> dq_shift;
      out_fx[l] <= sat_fx(48'(sat_fx(scaled)) + 48'(bias[in_grp][l]));
    end
  end

endmodule
