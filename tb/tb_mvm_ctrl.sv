// tb_mvm_ctrl: the controller with EP = 4, VP = 16 against a model of its
// surroundings: an input queue with gaps, and a hidden-vector buffer that
// is written back 2 elements per cycle starting DELAY cycles after each
// sweep. Every issued tile is compared with the expected walk (column tiles
// outer, row blocks inner, x tiles first): weight address, row block,
// first/last flags, vector slice (zero point at t = 0) and zero-point
// correction on the last tile. An h tile may only issue once its elements are
// written; with DELAY = 20 the short x part must stall (stall_h), and the
// queue gaps must cause stall_x. Issued tiles = ts * nct * nrb, and done must
// follow the final write-back.
module tb_mvm_ctrl;
  import rnn_pkg::*;

  localparam int EP = 4, VP = 16, NRB_MAX = 4, WDEPTH = 48, MAX_LH = 16, NTAIL = 2;
  localparam int DELAY = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start, busy, done, x_avail, x_pop, h_init, sweep_done;
  logic [2:0]     nrb;
  rnn_cfg_t       cfg;
  q8_t [EP-1:0]   x_data, h_data, iss_x;
  logic [4:0]     h_count, h_rd_base;
  logic           iss_valid, iss_first, iss_last, stall_h, stall_x;
  logic [5:0]     iss_addr;
  logic [1:0]     iss_rb;
  acc_t           iss_corr;

  mvm_ctrl #(.EP(EP), .VP(VP), .NRB_MAX(NRB_MAX), .WDEPTH(WDEPTH), .MAX_LH(MAX_LH)) dut (.*);

  int checks = 0, failures = 0;
  int xq [$];                 // queued x elements
  int hmem [MAX_LH];
  int lx, lh, ts, nct, enrb;
  int e_t, e_ct, e_rb, xsum, issued, n_stall_h, n_stall_x, wb_timer, wb_cnt;
  bit wb_active, finished;
  int xtile [EP];

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  // environment: x queue head and hidden buffer read
  always_comb begin
    x_avail = xq.size() >= EP;
    for (int e = 0; e < EP; e++) begin
      x_data[e] = (xq.size() > e) ? q8_t'(xq[e]) : '0;
      h_data[e] = h_init ? cfg.zx : q8_t'(hmem[int'(h_rd_base) + e]);
    end
  end

  always @(posedge clk) begin
    if (rst_n && !finished) begin
      if (stall_h) n_stall_h++;
      if (stall_x) n_stall_x++;
      if (iss_valid) begin
        int exp_addr;
        bit is_x;
        q8_t [EP-1:0] ev;
        is_x = e_ct < lx / EP;
        exp_addr = e_ct * enrb + e_rb;
        if (is_x && e_rb == 0) for (int e = 0; e < EP; e++) xtile[e] = xq[e];
        for (int e = 0; e < EP; e++)
          ev[e] = is_x ? q8_t'(xtile[e]) : (e_t == 0 ? cfg.zx : q8_t'(hmem[(e_ct - lx / EP) * EP + e]));
        chk(int'(iss_addr) == exp_addr, $sformatf("addr %0d expected %0d", iss_addr, exp_addr));
        chk(int'(iss_rb) == e_rb, "row block");
        chk(iss_first == (e_ct == 0) && iss_last == (e_ct == nct - 1), "first/last");
        chk(iss_x == ev, $sformatf("t=%0d ct=%0d rb=%0d vector slice", e_t, e_ct, e_rb));
        if (!is_x && e_t > 0)
          chk(int'(h_count) >= (e_ct - lx / EP + 1) * EP, "h tile issued before written");
        if (e_rb == 0) for (int e = 0; e < EP; e++) xsum += int'(ev[e]);
        if (iss_last)
          chk(iss_corr == acc_t'(nct * EP * int'(cfg.zw) * int'(cfg.zx) - int'(cfg.zw) * xsum),
              "zero-point correction");
        if (is_x && e_rb == 0) repeat (EP) void'(xq.pop_front());
        chk(x_pop == (is_x && e_rb == 0), "x_pop");
        issued++;
        if (e_rb == enrb - 1) begin
          e_rb = 0;
          if (e_ct == nct - 1) begin
            e_ct = 0; e_t++; xsum = 0;
            chk(sweep_done, "sweep_done");
          end else e_ct++;
        end else e_rb++;
      end
    end
  end

  // environment: write-back of h_t DELAY cycles after each sweep
  always @(posedge clk) begin
    if (!rst_n) begin
      h_count <= '0; wb_active = 0;
    end else if (sweep_done) begin
      h_count <= '0; wb_active = 1; wb_timer = DELAY; wb_cnt = 0;
    end else if (wb_active) begin
      if (wb_timer > 0) wb_timer--;
      else begin
        for (int l = 0; l < NTAIL; l++) hmem[wb_cnt + l] = int'($urandom_range(0, 255));
        wb_cnt += NTAIL;
        h_count <= 5'(wb_cnt);
        if (wb_cnt == lh) wb_active = 0;
      end
    end
  end

  task automatic run(input int lx_i, input int lh_i, input int ts_i, input int gap);
    int cyc;
    lx = lx_i; lh = lh_i; ts = ts_i;
    nct = (lx + lh) / EP; enrb = (4 * lh + VP - 1) / VP;
    e_t = 0; e_ct = 0; e_rb = 0; xsum = 0; issued = 0; n_stall_h = 0; n_stall_x = 0;
    finished = 0;
    cfg = '0; cfg.lx = 16'(lx); cfg.lh = 16'(lh); cfg.ts = 16'(ts); cfg.zx = 8'd90; cfg.zw = 8'd140;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    chk(int'(nrb) == enrb, "nrb");
    fork
      begin
        for (int t = 0; t < ts; t++) begin
          if (gap != 0) repeat (gap) @(negedge clk);
          for (int k = 0; k < lx; k++) xq.push_back(int'($urandom_range(0, 255)));
        end
      end
      begin
        cyc = 0;
        while (!done) begin @(posedge clk); cyc++; end
      end
    join
    finished = 1;
    chk(issued == ts * nct * enrb, $sformatf("%0d tiles issued, expected %0d", issued, ts * nct * enrb));
    chk(!wb_active && int'(h_count) == lh, "done before the last write-back");
    $display("run lx=%0d lh=%0d ts=%0d: cycles=%0d issued=%0d stall_h=%0d stall_x=%0d",
             lx, lh, ts, cyc, issued, n_stall_h, n_stall_x);
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(8, 8, 3, 0);
    chk(n_stall_h > 0, "short x part must stall on h");
    run(8, 16, 2, 30);
    chk(n_stall_x > 0, "input gaps must stall");
    run(16, 4, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
