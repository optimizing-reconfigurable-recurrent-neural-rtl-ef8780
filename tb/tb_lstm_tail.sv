// tb_lstm_tail: one tail serving 6 hidden elements for 4 timesteps. Random
// gate pre-activations are streamed one element per cycle (with random
// idle cycles); h_t and c_t must match the reference cell update, with c_{-1}
// = 0 on the first timestep and the stored c_{t-1} afterwards, 4 cycles after
// the input. A second sequence follows the first, so the restart of c at
// in_first is tested over stale cell state.
module tb_lstm_tail;
  import rnn_pkg::*;
  import lstm_ref_pkg::*;

  localparam int CDEPTH = 6, TS = 4, LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_first, out_valid;
  logic [2:0]  in_addr;
  fx_t         in_i, in_f, in_g, in_o, out_h, out_c;

  lstm_tail #(.CDEPTH(CDEPTH)) dut (.*);

  int c_ref [CDEPTH];
  int q_h [$], q_c [$], q_t [$];
  int checks = 0, failures = 0, cyc = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (out_valid) begin
      checks += 3;
      if (q_h.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        int eh, ec, et;
        eh = q_h.pop_front(); ec = q_c.pop_front(); et = q_t.pop_front();
        if (int'(out_h) != eh) begin failures++; $display("FAIL: h %0d expected %0d", out_h, eh); end
        if (int'(out_c) != ec) begin failures++; $display("FAIL: c %0d expected %0d", out_c, ec); end
        if (cyc != et + LAT) begin failures++; $display("FAIL: latency %0d", cyc - et); end
      end
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_addr = 0; in_i = 0; in_f = 0; in_g = 0; in_o = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // two sequences: the second restarts from c = 0 over stale cell state
    for (int st = 0; st < 2 * TS; st++) begin
      int t;
      t = st % TS;
      for (int a = 0; a < CDEPTH; a++) begin
        int gi, gf, gg, go, cp, cn;
        while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        gi = int'($urandom_range(0, 40000)) - 20000;
        gf = int'($urandom_range(0, 40000)) - 20000;
        gg = int'($urandom_range(0, 40000)) - 20000;
        go = int'($urandom_range(0, 40000)) - 20000;
        in_valid = 1; in_first = (t == 0); in_addr = 3'(a);
        in_i = fx_t'(gi); in_f = fx_t'(gf); in_g = fx_t'(gg); in_o = fx_t'(go);
        cp = (t == 0) ? 0 : c_ref[a];
        cn = sat16(longint'(fmul(sigm(gf), cp)) + longint'(fmul(sigm(gi), tnh(gg))));
        c_ref[a] = cn;
        q_c.push_back(cn);
        q_h.push_back(fmul(sigm(go), tnh(cn)));
        q_t.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (q_h.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", q_h.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
