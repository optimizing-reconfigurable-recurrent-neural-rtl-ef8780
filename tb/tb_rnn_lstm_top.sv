// tb_rnn_lstm_top: end-to-end test of the LSTM engine at reduced size.
//
// Loads random weights and biases, streams random input vectors and checks
// every hidden element of every timestep (Q3.12 value and quantized value)
// against a bit-exact model of the layer computed here from the same
// formulas (lstm_ref_pkg). Three runs on one instance exercise the
// mechanisms of the design and count them:
//   run A  short x part (lx = 8, lh = 8, two row blocks): the x tiles cannot
//          cover the tail pipeline, so the controller must stall on h_{t-1};
//   run B  long x part (lx = 32, lh = 16, four row blocks): the next
//          timestep's x tiles are issued while the tails finish h_t
//          (overlap) and no h stall may happen;
//   run C  like A but the input stream has gaps, so x starvation stalls.
// Cycle checks: issued tiles = ts * (lx+lh)/EP * NRB exactly; in run B the
// sequence takes no more than that plus one pipeline drain.
module tb_rnn_lstm_top;
  import rnn_pkg::*;
  import lstm_ref_pkg::*;

  localparam int EP = 4, VP = 16, NTAIL = 2, MAX_LX = 32, MAX_LH = 16, WDEPTH = 48;
  localparam int MAXR = 4 * MAX_LH, MAXC = MAX_LX + MAX_LH, MAXT = 4;
  localparam int WATCHDOG = 100000;

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

  rnn_lstm_top #(.EP(EP), .VP(VP), .NTAIL(NTAIL), .MAX_LX(MAX_LX), .MAX_LH(MAX_LH),
                 .WDEPTH(WDEPTH)) dut (.*);

  int W [MAXR][MAXC];
  int B [MAXR];
  int X [MAXT][MAX_LX];
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
          acc += longint'(W[r][k] - int'(cfg.zw)) * longint'(v[k] - int'(cfg.zx));
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
      for (int k = 0; k < lx + lh; k++) W[r][k] = 88 + int'($urandom_range(0, 80));
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

    run("A", 8, 8, 3, 0);
    check(cnt_stall_h != 0, "A: short x part must stall on h");

    run("B", 32, 16, 3, 0);
    check(cnt_stall_h == 0, "B: long x part must hide the tail latency (no h stall)");
    check(cnt_overlap != 0, "B: next timestep must overlap the tails");
    check(int'(cnt_busy) <= int'(cnt_issue) + 40,
          $sformatf("B: %0d busy cycles for %0d tiles", cnt_busy, cnt_issue));

    run("C", 8, 8, 2, 25);
    check(cnt_stall_x != 0, "C: gaps in the input stream must stall");

    check(n_hstall_runs > 0,  "mechanism: h hazard stall never happened");
    check(n_overlap_runs > 0, "mechanism: timestep overlap never happened");
    check(n_xstall_runs > 0,  "mechanism: x starvation never happened");
    check(n_multi_rb > 0,     "mechanism: multiple row blocks never used");
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
