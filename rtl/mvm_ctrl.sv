// mvm_ctrl: column-wise, tiled walk over the combined LSTM weight matrix.
//
// The combined matrix has 4*lh rows (four interlaced gates) and lx + lh
// columns ([x_t, h_{t-1}]). It is cut into tiles of EP columns by VP rows.
// For each timestep the controller walks the column tiles in order, first
// the lx/EP tiles of x_t, then the lh/EP tiles of h_{t-1}; inside a column
// tile it walks the NRB = ceil(4*lh / VP) row blocks, so every kernel keeps
// one partial sum per row block. One tile is issued per cycle: the EP vector
// elements go to all VP kernels, and each kernel reads its EP weights at
// address ctile * NRB + rb.
//
// Latency hiding: the x tiles of timestep t+1 do not depend on h_t, so they
// are issued right after the last tile of timestep t while the tails are
// still computing h_t. An h tile k is issued only once elements
// 0 .. (k+1)*EP - 1 of h_{t-1} have been written back (h_count); otherwise
// the controller stalls (stall_h). It also stalls when the next x tile has
// not arrived (stall_x). At t = 0 the h tiles read the zero point (h_init).
//
// Zero-point correction: the controller sums the vector elements of the
// sweep and sends corr = n*zw*zx - zw*sum(x) with the last column tile.
//
// Timing: start (one cycle, in IDLE) latches cfg; the first tile can issue in
// the next cycle. done pulses when the last h_t of the sequence has been
// written back. The walk order inside a column tile (row blocks inner) and
// the written-count hazard check are this implementation's choices.
module mvm_ctrl
  import rnn_pkg::*;
#(
  parameter int unsigned EP      = 16,
  parameter int unsigned VP      = 1024,
  parameter int unsigned NRB_MAX = 6,
  parameter int unsigned WDEPTH  = 1152,
  parameter int unsigned MAX_LH  = 1536,
  localparam int unsigned AW     = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int unsigned RBW    = (NRB_MAX > 1) ? $clog2(NRB_MAX) : 1,
  localparam int unsigned IW     = $clog2(MAX_LH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  rnn_cfg_t             cfg,
  output logic                 busy,
  output logic                 done,
  output logic [RBW:0]         nrb,
  // x tiles (show-ahead queue)
  input  logic                 x_avail,
  input  q8_t [EP-1:0]         x_data,
  output logic                 x_pop,
  // hidden vector buffer
  input  logic [IW-1:0]        h_count,
  input  q8_t [EP-1:0]         h_data,
  output logic [IW-1:0]        h_rd_base,
  output logic                 h_init,
  output logic                 sweep_done,
  // tile issue to the kernels
  output logic                 iss_valid,
  output logic [AW-1:0]        iss_addr,
  output q8_t [EP-1:0]         iss_x,
  output logic                 iss_first,
  output logic                 iss_last,
  output logic [RBW-1:0]       iss_rb,
  output acc_t                 iss_corr,
  // status
  output logic                 stall_h,
  output logic                 stall_x
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINISH} state_e;
  state_e state;

  localparam int unsigned EPS = $clog2(EP);
  localparam int unsigned VPS = $clog2(VP);

  rnn_cfg_t         c;
  logic [15:0]      nct_x, nct, ct, t;
  logic [RBW-1:0]   rb;
  logic [AW-1:0]    addr;
  logic [ACC_W-1:0] xsum_run, corr_base;
  q8_t [EP-1:0]     hold;

  logic             is_x, ok;
  logic [15:0]      hk;
  q8_t [EP-1:0]     vec;
  logic [ACC_W-1:0] tile_sum, xs_now;

  always_comb begin
    is_x      = ct < nct_x;
    hk        = ct - nct_x;
    h_rd_base = IW'(hk << EPS);
    h_init    = (t == '0);
    if (is_x) begin
      vec = (rb == '0) ? x_data : hold;
      ok  = (rb != '0) || x_avail;
    end else begin
      vec = h_data;
      ok  = h_init || (32'(h_count) >= (32'(hk) + 32'd1) << EPS);
    end
    tile_sum = '0;
    for (int e = 0; e < EP; e++) tile_sum += ACC_W'(vec[e]);
    if (rb == '0) xs_now = ((ct == '0) ? '0 : xsum_run) + tile_sum;
    else          xs_now = xsum_run;
  end

  assign iss_valid = (state == S_RUN) && ok;
  assign iss_addr  = addr;
  assign iss_x     = vec;
  assign iss_first = (ct == '0);
  assign iss_last  = (ct == nct - 1'b1);
  assign iss_rb    = rb;
  assign iss_corr  = acc_t'(corr_base - ACC_W'(c.zw) * xs_now);
  assign x_pop     = iss_valid && is_x && (rb == '0);
  assign stall_h   = (state == S_RUN) && !ok && !is_x;
  assign stall_x   = (state == S_RUN) && !ok && is_x;
  assign busy      = (state != S_IDLE);
  assign sweep_done = iss_valid && iss_last && ({1'b0, rb} == nrb - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      c         <= '0;
      nct_x     <= '0;
      nct       <= '0;
      nrb       <= '0;
      ct        <= '0;
      rb        <= '0;
      t         <= '0;
      addr      <= '0;
      xsum_run  <= '0;
      corr_base <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          c         <= cfg;
          nct_x     <= cfg.lx >> EPS;
          nct       <= (cfg.lx + cfg.lh) >> EPS;
          nrb       <= (RBW+1)'(((32'(cfg.lh) << 2) + VP - 1) >> VPS);
          corr_base <= ACC_W'(cfg.lx + cfg.lh) * ACC_W'(cfg.zw) * ACC_W'(cfg.zx);
          ct        <= '0;
          rb        <= '0;
          t         <= '0;
          addr      <= '0;
          state     <= S_RUN;
        end
        S_RUN: if (iss_valid) begin
          if (rb == '0) xsum_run <= xs_now;
          if ({1'b0, rb} == nrb - 1'b1) begin
            rb <= '0;
            if (iss_last) begin
              ct   <= '0;
              addr <= '0;
              t    <= t + 1'b1;
              if (t == c.ts - 1'b1) state <= S_FINISH;
            end else begin
              ct   <= ct + 1'b1;
              addr <= addr + 1'b1;
            end
          end else begin
            rb   <= rb + 1'b1;
            addr <= addr + 1'b1;
          end
        end
        S_FINISH: if (32'(h_count) == 32'(c.lh) && !sweep_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (iss_valid && is_x && rb == '0) hold <= vec;
  end

endmodule
