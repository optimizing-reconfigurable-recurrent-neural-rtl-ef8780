// mvm_kernel: one column-wise MVM kernel (EP processing elements).
//
// A kernel owns one row of the current row block of the combined weight
// matrix. Every issued tile brings EP elements of the vector [x_t, h_{t-1}]
// (broadcast to all kernels) and the kernel reads its own EP weights of that
// tile from its weight_buffer. The EP 8-bit x 8-bit products (the PEs) go
// through a small balanced adder tree and are added into a 32-bit
// accumulator; there is one accumulator per row block (NRB_MAX of them), so
// partial sums of all row blocks can be carried while the column tiles are
// walked in order. This is the multiplier / adder-tree / accumulator
// structure of the design.
//
// Zero-point compensation: operands are unsigned with zero points zx (vector)
// and zw (weights), and the wanted value is sum((w - zw)(x - zx)). The kernel
// accumulates sum(w*x) and sum(w) for its row and, on the last column tile,
// emits sum(w*x) - zx*sum(w) + corr, where corr = n*zw*zx - zw*sum(x) is the
// same for every row and is computed once by the controller and passed down
// with the last tile. Splitting the compensation this way is this
// implementation's choice.
//
// Timing: a tile issued in cycle n (in_valid) is accumulated in cycle
// n + 2 + log2(EP) and, if it was the last column tile, its result appears on
// out_* one cycle later (latency LAT = 3 + log2(EP)). One tile per cycle,
// no back-pressure.
module mvm_kernel
  import rnn_pkg::*;
#(
  parameter int unsigned EP      = 16,
  parameter int unsigned WDEPTH  = 1152,
  parameter int unsigned NRB_MAX = 6,
  localparam int unsigned AW     = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int unsigned RBW    = (NRB_MAX > 1) ? $clog2(NRB_MAX) : 1,
  localparam int unsigned TL     = (EP > 1) ? $clog2(EP) : 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // weight loading
  input  logic                 w_we,
  input  logic [AW-1:0]        w_addr,
  input  logic [EP*8-1:0]      w_data,
  // tile issue (common to all kernels)
  input  logic                 in_valid,
  input  logic [AW-1:0]        in_addr,
  input  q8_t [EP-1:0]         in_x,
  input  logic                 in_first,   // first column tile: restart the sum
  input  logic                 in_last,    // last column tile: emit result
  input  logic [RBW-1:0]       in_rb,
  input  acc_t                 in_corr,    // shared zero-point correction (with in_last)
  input  q8_t                  zx,
  // result of one row
  output logic                 out_valid,
  output logic [RBW-1:0]       out_rb,
  output acc_t                 out_val
);

  typedef struct packed {
    logic            valid;
    logic            first;
    logic            last;
    logic [RBW-1:0]  rb;
    acc_t            corr;
  } ctl_t;

  // ---------------- stage 0 -> 1: weight read, operands registered
  logic [EP*8-1:0] w_rd;
  q8_t [EP-1:0]    x_s1;
  ctl_t            c_s1;

  weight_buffer #(.EP(EP), .DEPTH(WDEPTH)) u_wbuf (
    .clk(clk), .we(w_we), .waddr(w_addr), .wdata(w_data),
    .rd_en(in_valid), .rd_addr(in_addr), .rd_data(w_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_s1 <= '0;
    else        c_s1 <= '{valid: in_valid, first: in_first, last: in_last,
                          rb: in_rb, corr: in_corr};
  end
  always_ff @(posedge clk) x_s1 <= in_x;

  // ---------------- stage 1 -> 2: the EP processing elements
  prod_t [EP-1:0]  prod_s2;
  q8_t   [EP-1:0]  w_s2;
  ctl_t            c_s2;

  always_ff @(posedge clk) begin
    for (int e = 0; e < EP; e++) begin
      prod_s2[e] <= prod_t'(w_rd[e*8 +: 8]) * prod_t'(x_s1[e]);
      w_s2[e]    <= w_rd[e*8 +: 8];
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_s2 <= '0;
    else        c_s2 <= c_s1;
  end

  // ---------------- stage 2 -> 3: balanced adder trees (TL cycles)
  logic [PROD_W+TL-1:0] psum_s3;
  logic [8+TL-1:0]      wsum_s3;
  ctl_t                 c_s3;

  adder_tree #(.N(EP), .IW(PROD_W)) u_ptree (.clk(clk), .in(prod_s2), .sum(psum_s3));
  adder_tree #(.N(EP), .IW(8))      u_wtree (.clk(clk), .in(w_s2),    .sum(wsum_s3));

  if (TL == 0) begin : g_nodly
    assign c_s3 = c_s2;
  end else begin : g_dly
    ctl_t dly [TL];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < TL; i++) dly[i] <= '0;
      end else begin
        dly[0] <= c_s2;
        for (int i = 1; i < TL; i++) dly[i] <= dly[i-1];
      end
    end
    assign c_s3 = dly[TL-1];
  end

  // ---------------- stage 3: accumulate per row block, compensate on last
  logic [ACC_W-1:0] acc_mem  [NRB_MAX];
  logic [ACC_W-1:0] wacc_mem [NRB_MAX];
  logic [ACC_W-1:0] acc_new, wacc_new;

  always_comb begin
    acc_new  = (c_s3.first ? '0 : acc_mem[c_s3.rb])  + ACC_W'(psum_s3);
    wacc_new = (c_s3.first ? '0 : wacc_mem[c_s3.rb]) + ACC_W'(wsum_s3);
  end

  always_ff @(posedge clk) begin
    if (c_s3.valid) begin
      acc_mem[c_s3.rb]  <= acc_new;
      wacc_mem[c_s3.rb] <= wacc_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rb    <= '0;
      out_val   <= '0;
    end else begin
      out_valid <= c_s3.valid && c_s3.last;
      if (c_s3.valid && c_s3.last) begin
        out_rb  <= c_s3.rb;
        out_val <= acc_t'(acc_new - ACC_W'(zx) * wacc_new + ACC_W'(c_s3.corr));
      end
    end
  end

endmodule
