// adapter: re-shapes the kernel results for the tails.
//
// The VP kernels deliver one row block (VP consecutive rows of the combined
// matrix) per cycle, and all NRB row blocks of a timestep arrive in NRB
// consecutive cycles after the last column tile. The tails consume LANES =
// 4 * NTAIL rows per cycle (NTAIL hidden elements, four interlaced gate rows
// each). The adapter stores the row blocks and, once the last one is in,
// streams the first 4 * lh rows out in groups of LANES rows, group g holding
// rows g*LANES .. g*LANES + LANES - 1, i.e. hidden elements g*NTAIL ..
// g*NTAIL + NTAIL - 1. Rows beyond 4 * lh (unused kernels of the last row
// block) are dropped.
//
// A single buffer is enough: the results of timestep t+1 need all of h_t,
// which needs this drain to be finished (checked by an assertion). out_first
// marks groups of the first timestep of a sequence (start restarts it).
// Requires VP to be a multiple of LANES. Timing: the first group leaves one
// cycle after the last row block arrives, then one group per cycle.
module adapter
  import rnn_pkg::*;
#(
  parameter int unsigned VP      = 1024,
  parameter int unsigned NRB_MAX = 6,
  parameter int unsigned LANES   = 64,
  parameter int unsigned MAX_LH  = 1536,
  localparam int unsigned RBW    = (NRB_MAX > 1) ? $clog2(NRB_MAX) : 1,
  localparam int unsigned NGRP   = (4 * MAX_LH + LANES - 1) / LANES,
  localparam int unsigned GW     = (NGRP > 1) ? $clog2(NGRP) : 1,
  localparam int unsigned KW     = (VP > 1) ? $clog2(VP) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [RBW:0]         nrb,      // row blocks per timestep
  input  logic [GW:0]          ngrp,     // groups per timestep = lh / NTAIL
  input  logic                 in_valid,
  input  logic [RBW-1:0]       in_rb,
  input  acc_t [VP-1:0]        in_val,
  output logic                 busy,
  output logic                 out_valid,
  output logic                 out_first,
  output logic [GW-1:0]        out_grp,
  output acc_t [LANES-1:0]     out_acc
);

  localparam int unsigned GPB = VP / LANES;  // groups per row block

  acc_t [VP-1:0] store [NRB_MAX];
  logic draining, first_ts;
  logic [GW-1:0] grp;
  logic [GW-1:0] grb, goff;
  assign grb  = grp / GW'(GPB);
  assign goff = grp % GW'(GPB);

  always_ff @(posedge clk) begin
    if (in_valid) store[in_rb] <= in_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining <= 1'b0;
      grp      <= '0;
      first_ts <= 1'b1;
    end else begin
      if (start) first_ts <= 1'b1;
      if (in_valid && ({1'b0, in_rb} == nrb - 1'b1)) begin
        draining <= 1'b1;
        grp      <= '0;
      end else if (draining) begin
        if ({1'b0, grp} == ngrp - 1'b1) begin
          draining <= 1'b0;
          first_ts <= 1'b0;
        end
        grp <= grp + 1'b1;
      end
    end
  end

  assign busy = draining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_grp   <= '0;
    end else begin
      out_valid <= draining;
      out_first <= first_ts;
      out_grp   <= grp;
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      out_acc[l] <= store[RBW'(grb)][KW'(32'(goff) * LANES + l)];
  end

  // A new timestep's results must never overtake the drain of the last one.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && draining));

endmodule
