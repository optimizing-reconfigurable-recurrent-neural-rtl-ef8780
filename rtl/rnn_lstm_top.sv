// rnn_lstm_top: latency-hiding LSTM inference engine with column-wise MVM.
//
// The four gate matrices of an LSTM layer are stored as one combined matrix
// of 4*lh rows (gates interlaced: row 4j+0/1/2/3 = i/f/g/o of hidden element
// j) by lx + lh columns. mvm_ctrl walks it column tile by column tile
// (tiles of EP columns x VP rows), x_t part first, and broadcasts each EP
// vector slice to VP mvm_kernels, each a row of EP 8-bit multipliers with an
// adder tree and per-row-block accumulators. After the last column tile the
// adapter drains the finished gate vector to the tails NTAIL hidden elements
// per cycle; dequant converts to 16-bit fixed point and adds the bias, NTAIL
// lstm_tails compute c_t and h_t, quant turns h_t back into 8-bit values and
// vector_buffer stores them for the h part of the next timestep. Because the
// next timestep starts with its x part, the tails work in its shadow and the
// MVM only stalls if the x part is too short to cover the pipeline.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//  * cfg/start/busy/done: cfg is latched by a one-cycle start while idle;
//    done pulses once the last h_t of cfg.ts timesteps is written back.
//  * weights: w_we writes the EP weights of row w_row, column tile w_ctile
//    (uses cfg.lh to find the row block, so hold cfg while loading).
//  * bias: b_we writes the 16-bit Q3.12 bias of combined-matrix row b_row.
//  * x: x_valid/x_ready stream of EP-element slices of x_t, in order, lx/EP
//    slices per timestep.
//  * h: h_valid marks NTAIL hidden elements starting at h_base, as Q3.12
//    values (h_fx) and as quantized values (h_q), once per element per step.
//  * counters (cleared by start): busy cycles, cycles a tile was issued,
//    h-hazard stall cycles, x-starved cycles, and cycles a tile was issued
//    while results of an earlier timestep were still in the tail pipeline.
//
// Sizes: EP = 16 and VP = 1024 are the large configuration of the design
// (16384 multipliers). NTAIL, the maximum vector lengths and the
// weight-buffer depth are this implementation's choices, sized so that the
// largest benchmark layer (lx = lh = 1536) fits. Requirements: lx and lh
// multiples of EP, lh a multiple of NTAIL, VP a multiple of 4*NTAIL, EP and
// VP powers of two, (lx+lh)/EP * ceil(4*lh/VP) <= WDEPTH.
module rnn_lstm_top
  import rnn_pkg::*;
#(
  parameter int unsigned EP      = 16,
  parameter int unsigned VP      = 1024,
  parameter int unsigned NTAIL   = 16,
  parameter int unsigned MAX_LX  = 2048,
  parameter int unsigned MAX_LH  = 1536,
  parameter int unsigned WDEPTH  = 1152,
  parameter int unsigned XFIFO   = 8,
  localparam int unsigned NRB_MAX = (4 * MAX_LH + VP - 1) / VP,
  localparam int unsigned LANES  = 4 * NTAIL,
  localparam int unsigned NGRP   = (4 * MAX_LH + LANES - 1) / LANES,
  localparam int unsigned GW     = (NGRP > 1) ? $clog2(NGRP) : 1,
  localparam int unsigned RBW    = (NRB_MAX > 1) ? $clog2(NRB_MAX) : 1,
  localparam int unsigned AW     = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int unsigned IW     = $clog2(MAX_LH + 1),
  localparam int unsigned KW     = (VP > 1) ? $clog2(VP) : 1,
  localparam int unsigned CDEPTH = (MAX_LH + NTAIL - 1) / NTAIL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rnn_cfg_t             cfg,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // weight loading
  input  logic                 w_we,
  input  logic [15:0]          w_row,
  input  logic [15:0]          w_ctile,
  input  q8_t [EP-1:0]         w_data,
  // bias loading
  input  logic                 b_we,
  input  logic [15:0]          b_row,
  input  fx_t                  b_val,
  // input vectors
  input  logic                 x_valid,
  output logic                 x_ready,
  input  q8_t [EP-1:0]         x_data,
  // hidden vectors
  output logic                 h_valid,
  output logic [15:0]          h_base,
  output fx_t  [NTAIL-1:0]     h_fx,
  output q8_t  [NTAIL-1:0]     h_q,
  // performance counters
  output logic [31:0]          cnt_busy,
  output logic [31:0]          cnt_issue,
  output logic [31:0]          cnt_stall_h,
  output logic [31:0]          cnt_stall_x,
  output logic [31:0]          cnt_overlap
);

  // ---------------------------------------------------------------- input queue
  logic         xq_full, xq_empty, x_pop;
  q8_t [EP-1:0] xq_data;

  sync_fifo #(.DW(EP * 8), .DEPTH(XFIFO)) u_xq (
    .clk(clk), .rst_n(rst_n),
    .wr_en(x_valid && x_ready), .wr_data(x_data), .full(xq_full),
    .rd_en(x_pop), .rd_data(xq_data), .empty(xq_empty)
  );
  assign x_ready = !xq_full;

  // ---------------------------------------------------------------- controller
  logic [RBW:0]   nrb;
  logic [IW-1:0]  h_count, h_rd_base;
  q8_t [EP-1:0]   h_rd;
  logic           h_init, sweep_done, stall_h, stall_x;
  logic           iss_valid, iss_first, iss_last;
  logic [AW-1:0]  iss_addr;
  q8_t [EP-1:0]   iss_x;
  logic [RBW-1:0] iss_rb;
  acc_t           iss_corr;

  mvm_ctrl #(.EP(EP), .VP(VP), .NRB_MAX(NRB_MAX), .WDEPTH(WDEPTH), .MAX_LH(MAX_LH)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .cfg(cfg), .busy(busy), .done(done), .nrb(nrb),
    .x_avail(!xq_empty), .x_data(xq_data), .x_pop(x_pop),
    .h_count(h_count), .h_data(h_rd), .h_rd_base(h_rd_base), .h_init(h_init),
    .sweep_done(sweep_done),
    .iss_valid(iss_valid), .iss_addr(iss_addr), .iss_x(iss_x), .iss_first(iss_first),
    .iss_last(iss_last), .iss_rb(iss_rb), .iss_corr(iss_corr),
    .stall_h(stall_h), .stall_x(stall_x)
  );

  // ---------------------------------------------------------------- kernels
  // Weight write address: row r lives in kernel r mod VP, row block r / VP,
  // at word ctile * NRB + rb. NRB follows the configured lh.
  logic [RBW:0]   w_nrb;
  logic [KW-1:0]  w_kernel;
  logic [AW-1:0]  w_addr;
  assign w_nrb    = (RBW+1)'(((32'(cfg.lh) << 2) + VP - 1) / VP);
  assign w_kernel = KW'(w_row % 16'(VP));
  assign w_addr   = AW'(32'(w_ctile) * 32'(w_nrb) + 32'(w_row / 16'(VP)));

  logic [VP-1:0]  k_valid;
  logic [RBW-1:0] k_rb [VP];
  acc_t [VP-1:0]  k_val;

  for (genvar k = 0; k < VP; k++) begin : g_kernel
    mvm_kernel #(.EP(EP), .WDEPTH(WDEPTH), .NRB_MAX(NRB_MAX)) u_kernel (
      .clk(clk), .rst_n(rst_n),
      .w_we(w_we && (w_kernel == KW'(k))), .w_addr(w_addr), .w_data(w_data),
      .in_valid(iss_valid), .in_addr(iss_addr), .in_x(iss_x),
      .in_first(iss_first), .in_last(iss_last), .in_rb(iss_rb), .in_corr(iss_corr),
      .zx(cfg.zx),
      .out_valid(k_valid[k]), .out_rb(k_rb[k]), .out_val(k_val[k])
    );
  end

  // ---------------------------------------------------------------- adapter
  logic                  ad_busy, ad_valid, ad_first;
  logic [GW-1:0]         ad_grp;
  acc_t [LANES-1:0]      ad_acc;

  adapter #(.VP(VP), .NRB_MAX(NRB_MAX), .LANES(LANES), .MAX_LH(MAX_LH)) u_adapter (
    .clk(clk), .rst_n(rst_n), .start(start), .nrb(nrb),
    .ngrp((GW+1)'(cfg.lh / 16'(NTAIL))),
    .in_valid(k_valid[0]), .in_rb(k_rb[0]), .in_val(k_val),
    .busy(ad_busy), .out_valid(ad_valid), .out_first(ad_first), .out_grp(ad_grp),
    .out_acc(ad_acc)
  );

  // ---------------------------------------------------------------- de-quantization
  logic             dq_valid, dq_first;
  logic [GW-1:0]    dq_grp;
  fx_t [LANES-1:0]  dq_fx;

  dequant #(.LANES(LANES), .MAX_ROWS(4 * MAX_LH)) u_dequant (
    .clk(clk), .rst_n(rst_n), .dq_mult(cfg.dq_mult), .dq_shift(cfg.dq_shift),
    .b_we(b_we), .b_row($clog2(4 * MAX_LH + 1)'(b_row)), .b_val(b_val),
    .in_valid(ad_valid), .in_grp(ad_grp), .in_acc(ad_acc),
    .out_valid(dq_valid), .out_grp(dq_grp), .out_fx(dq_fx)
  );

  always_ff @(posedge clk) dq_first <= ad_first;

  // ---------------------------------------------------------------- LSTM tails
  logic [NTAIL-1:0] tl_valid;
  fx_t [NTAIL-1:0]  tl_h;
  fx_t [NTAIL-1:0]  tl_c;

  for (genvar l = 0; l < NTAIL; l++) begin : g_tail
    lstm_tail #(.CDEPTH(CDEPTH)) u_tail (
      .clk(clk), .rst_n(rst_n),
      .in_valid(dq_valid), .in_first(dq_first),
      .in_addr(($clog2(CDEPTH) > 0 ? $clog2(CDEPTH) : 1)'(dq_grp)),
      .in_i(dq_fx[4*l + GATE_I]), .in_f(dq_fx[4*l + GATE_F]),
      .in_g(dq_fx[4*l + GATE_G]), .in_o(dq_fx[4*l + GATE_O]),
      .out_valid(tl_valid[l]), .out_h(tl_h[l]), .out_c(tl_c[l])
    );
  end

  // group index travels alongside the tails (4 cycles) and quant (1 cycle)
  logic [GW-1:0] grp_d [5];
  always_ff @(posedge clk) begin
    grp_d[0] <= dq_grp;
    for (int i = 1; i < 5; i++) grp_d[i] <= grp_d[i-1];
  end

  // ---------------------------------------------------------------- quantization
  logic            qn_valid;
  q8_t [NTAIL-1:0] qn_q;

  quant #(.LANES(NTAIL)) u_quant (
    .clk(clk), .rst_n(rst_n), .q_mult(cfg.q_mult), .q_shift(cfg.q_shift), .zx(cfg.zx),
    .in_valid(tl_valid[0]), .in_fx(tl_h), .out_valid(qn_valid), .out_q(qn_q)
  );

  always_ff @(posedge clk) h_fx <= tl_h;

  assign h_valid = qn_valid;
  assign h_base  = 16'(grp_d[4]) * 16'(NTAIL);
  assign h_q     = qn_q;

  // ---------------------------------------------------------------- hidden vector
  vector_buffer #(.EP(EP), .NTAIL(NTAIL), .MAX_LH(MAX_LH)) u_vbuf (
    .clk(clk), .rst_n(rst_n), .clr(sweep_done),
    .wr_en(qn_valid), .wr_base(IW'(h_base)), .wr_data(qn_q),
    .init(h_init), .zx(cfg.zx), .rd_base(h_rd_base), .rd_data(h_rd),
    .wr_count(h_count)
  );

  // ---------------------------------------------------------------- counters
  // pending: results of a finished sweep are somewhere between the kernel
  // outputs and the write into the vector buffer.
  logic pending;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= 1'b0;
    else if (k_valid[0]) pending <= 1'b1;
    else if (qn_valid && (32'(h_base) + NTAIL == 32'(cfg.lh))) pending <= 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_busy <= '0; cnt_issue <= '0; cnt_stall_h <= '0; cnt_stall_x <= '0; cnt_overlap <= '0;
    end else if (start && !busy) begin
      cnt_busy <= '0; cnt_issue <= '0; cnt_stall_h <= '0; cnt_stall_x <= '0; cnt_overlap <= '0;
    end else begin
      if (busy)                 cnt_busy    <= cnt_busy + 1;
      if (iss_valid)            cnt_issue   <= cnt_issue + 1;
      if (stall_h)              cnt_stall_h <= cnt_stall_h + 1;
      if (stall_x)              cnt_stall_x <= cnt_stall_x + 1;
      if (iss_valid && pending) cnt_overlap <= cnt_overlap + 1;
    end
  end

  // the x queue is never popped empty and a stall never issues
  a_pop_ok: assert property (@(posedge clk) disable iff (!rst_n) x_pop |-> !xq_empty);
  a_cfg_lx: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (32'(cfg.lx) <= MAX_LX && 32'(cfg.lh) <= MAX_LH));
  a_stall:  assert property (@(posedge clk) disable iff (!rst_n) (stall_h || stall_x) |-> !iss_valid);

endmodule
