// tb_rnn_lstm_deepbench: the DeepBench LSTM inference layers of the
// evaluation on the engine at its default size (EP = 16, VP = 1024, 16
// tails): h = 256 for 150 timesteps, h = 512 and h = 1024 for 25 timesteps,
// each with an input vector as long as the hidden vector. Every hidden
// element of every timestep is checked bit-exactly against lstm_ref_pkg.
// Cycle checks: exactly ts * (lx+lh)/16 * ceil(4*lh/1024) tiles are issued,
// and every busy cycle is an issue, a stall, or part of the final drain
// (about 20 + lh/16 cycles).
// The measured utilization (issue cycles / busy cycles) is printed.
// (h = 1536 fits the weight buffers exactly but is left out here to keep
// the run short; it only adds weight-loading time.)
module tb_rnn_lstm_deepbench;
  import rnn_pkg::*;
  import lstm_ref_pkg::*;

  localparam int EP = 16, VP = 1024, NTAIL = 16, MAX_LH = 1024;
  localparam int MAXR = 4 * MAX_LH, MAXC = 2 * MAX_LH, MAXT = 150;
  localparam int WATCHDOG = 1200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  rnn_cfg_t          cfg;
  logic              start, busy, done;
  logic              w_we;
  logic [15:0]       w_row, w_ctile;
  q8_t [EP-1:0]      w_data;
  logic              b_we;
  logic [15:0]       b_row;
  fx_t               b_val;
  logic              x_valid, x_ready;
  q8_t [EP-1:0]      x_data;
  logic              h_valid;
  logic [15:0]       h_base;
  fx_t [NTAIL-1:0]   h_fx;
  q8_t [NTAIL-1:0]   h_q;
  logic [31:0]       cnt_busy, cnt_issue, cnt_stall_h, cnt_stall_x, cnt_overlap;

  rnn_lstm_top dut (.*);

  byte unsigned W [MAXR][MAXC];
  int B [MAXR];
  int X [MAXT][MAXC];
  int ref_h [MAXT][MAX_LH];
  int ref_q [MAXT][MAX_LH];

  int checks = 0, failures = 0;
  int n_hstall_runs = 0, n_overlap_runs = 0, n_xstall_runs = 0, n_multi_rb = 0;
  int mon_t, mon_cnt, cur_lh;
  bit mon_on = 1'b0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- reference
  task automatic compute_ref(input int lx, input int lh, input int ts);
    int c [MAX_LH];
    int hq [MAX_LH];
    int v [MAXC];
    int pre [MAXR];
    for (int j = 0; j < lh; j++) begin c[j] = 0; hq[j] = int'(cfg.zx); end
    for (int t = 0; t < ts; t++) begin
      for (int k = 0; k < lx; k++) v[k] = X[t][k];
      for (int j = 0; j < lh; j++) v[lx + j] = hq[j];
      for (int r = 0; r < 4 * lh; r++) begin
        longint acc = 0;
        for (int k = 0; k < lx + lh; k++)
          acc += longint'(int'(W[r][k]) - int'(cfg.zw)) * longint'(v[k] - int'(cfg.zx));
        pre[r] = dequant(acc, int'(cfg.dq_mult), int'(cfg.dq_shift), B[r]);
      end
      for (int j = 0; j < lh; j++) begin
        int gi, gf, gg, go, cn;
        gi = sigm(pre[4*j]); gf = sigm(pre[4*j+1]); gg = tnh(pre[4*j+2]); go = sigm(pre[4*j+3]);
        cn = sat16(longint'(fmul(gf, c[j])) + longint'(fmul(gi, gg)));
        c[j] = cn;
        ref_h[t][j] = fmul(go, tnh(cn));
        ref_q[t][j] = quant(ref_h[t][j], int'(cfg.q_mult), int'(cfg.q_shift), int'(cfg.zx));
      end
      for (int j = 0; j < lh; j++) hq[j] = ref_q[t][j];
    end
  endtask

  // ---------------------------------------------------------------- monitor
  always @(negedge clk) begin
    if (mon_on && h_valid) begin
      for (int l = 0; l < NTAIL; l++) begin
        int j;
        j = int'(h_base) + l;
        check(int'(h_fx[l]) == ref_h[mon_t][j],
              $sformatf("t=%0d h[%0d] = %0d, expected %0d", mon_t, j, h_fx[l], ref_h[mon_t][j]));
        check(int'(h_q[l]) == ref_q[mon_t][j],
              $sformatf("t=%0d hq[%0d] = %0d, expected %0d", mon_t, j, h_q[l], ref_q[mon_t][j]));
      end
      mon_cnt++;
      if (int'(h_base) + NTAIL == cur_lh) mon_t++;
    end
  end

  task automatic util_check(input int lh);
    // final drain: kernel, adapter, dequant, tail and quant latency plus lh/NTAIL groups
    check(int'(cnt_busy) <= int'(cnt_issue + cnt_stall_h + cnt_stall_x) + 20 + lh / NTAIL,
          $sformatf("%0d busy cycles not explained by %0d issues and stalls", cnt_busy,
                    cnt_issue + cnt_stall_h + cnt_stall_x));
    $display("  utilization %0d.%01d %%", cnt_issue * 100 / cnt_busy, (cnt_issue * 1000 / cnt_busy) % 10);
  endtask

  // ---------------------------------------------------------------- one run
  task automatic run(input string name, input int lx, input int lh, input int ts,
                     input int gap);
    int nct, nrb, cyc, expect_issue;
    nct = (lx + lh) / EP;
    nrb = (4 * lh + VP - 1) / VP;
    cfg.lx = 16'(lx); cfg.lh = 16'(lh); cfg.ts = 16'(ts);
    cfg.zx = 8'd128; cfg.zw = 8'd128;
    cfg.dq_mult = 16'd85; cfg.dq_shift = 5'd8;
    cfg.q_mult = 16'd127; cfg.q_shift = 5'd12;
    for (int r = 0; r < 4 * lh; r++) begin
      for (int k = 0; k < lx + lh; k++) W[r][k] = 8'(88 + $urandom_range(0, 80));
      B[r] = int'($urandom_range(0, 4096)) - 2048;
    end
    for (int t = 0; t < ts; t++)
      for (int k = 0; k < lx; k++) X[t][k] = int'($urandom_range(0, 255));
    compute_ref(lx, lh, ts);

    // load weights and biases
    for (int r = 0; r < 4 * lh; r++) begin
      for (int ct = 0; ct < nct; ct++) begin
        @(negedge clk);
        w_we = 1'b1; w_row = 16'(r); w_ctile = 16'(ct);
        for (int e = 0; e < EP; e++) w_data[e] = q8_t'(W[r][ct*EP + e]);
      end
      @(negedge clk);
      w_we = 1'b0; b_we = 1'b1; b_row = 16'(r); b_val = fx_t'(B[r]);
    end
    @(negedge clk);
    b_we = 1'b0;

    mon_t = 0; mon_cnt = 0; cur_lh = lh; mon_on = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    fork
      begin : feed
        for (int t = 0; t < ts; t++) begin
          for (int k = 0; k < lx / EP; k++) begin
            if (gap != 0 && t > 0 && k == 0) repeat (gap) @(negedge clk);
            x_valid = 1'b1;
            for (int e = 0; e < EP; e++) x_data[e] = q8_t'(X[t][k*EP + e]);
            do @(posedge clk); while (!x_ready);
            @(negedge clk);
            x_valid = 1'b0;
          end
        end
      end
      begin : wait_done
        while (!done) begin
          @(posedge clk);
          cyc++;
        end
      end
    join
    repeat (3) @(negedge clk);
    mon_on = 1'b0;

    expect_issue = ts * nct * nrb;
    check(mon_t == ts && mon_cnt == ts * lh / NTAIL,
          $sformatf("%s: %0d h groups seen, expected %0d", name, mon_cnt, ts * lh / NTAIL));
    check(int'(cnt_issue) == expect_issue,
          $sformatf("%s: %0d tiles issued, expected %0d", name, cnt_issue, expect_issue));
    check(int'(cnt_busy) == cyc - 1,
          $sformatf("%s: busy counter %0d, measured %0d", name, cnt_busy, cyc - 1));
    $display("%s: lx=%0d lh=%0d ts=%0d nrb=%0d busy=%0d issue=%0d stall_h=%0d stall_x=%0d overlap=%0d",
             name, lx, lh, ts, nrb, cnt_busy, cnt_issue, cnt_stall_h, cnt_stall_x, cnt_overlap);
    if (cnt_stall_h != 0) n_hstall_runs++;
    if (cnt_stall_x != 0) n_xstall_runs++;
    if (cnt_overlap != 0) n_overlap_runs++;
    if (nrb > 1) n_multi_rb++;
  endtask

  initial begin
    start = 1'b0; w_we = 1'b0; b_we = 1'b0; x_valid = 1'b0;
    w_row = '0; w_ctile = '0; w_data = '0; b_row = '0; b_val = '0; x_data = '0;
    cfg = '0; cfg.lh = 16'd8;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    run("LSTM h=256 ts=150", 256, 256, 150, 0);
    util_check(256);
    run("LSTM h=512 ts=25", 512, 512, 25, 0);
    util_check(512);
    run("LSTM h=1024 ts=25", 1024, 1024, 25, 0);
    util_check(1024);
    $display("mechanisms: h_stall_runs=%0d overlap_runs=%0d x_stall_runs=%0d multi_rowblock_runs=%0d",
             n_hstall_runs, n_overlap_runs, n_xstall_runs, n_multi_rb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
