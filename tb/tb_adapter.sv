// tb_adapter: VP = 16 kernel outputs, LANES = 8 (two tails). Feeds two row
// blocks of distinct values and checks that groups 0 .. lh/2-1 come out one
// per cycle starting one cycle after the last row block, each lane holding
// row grp*8 + lane, with out_first only for the first timestep after start.
// Also runs a single-row-block case (lh = 4) where kernel rows 16.. are unused.
module tb_adapter;
  import rnn_pkg::*;

  localparam int VP = 16, NRB_MAX = 2, LANES = 8, MAX_LH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start, in_valid, busy, out_valid, out_first;
  logic [1:0]       nrb;
  logic [2:0]       ngrp;
  logic             in_rb;
  acc_t [VP-1:0]    in_val;
  logic [1:0]       out_grp;
  acc_t [LANES-1:0] out_acc;

  adapter #(.VP(VP), .NRB_MAX(NRB_MAX), .LANES(LANES), .MAX_LH(MAX_LH)) dut (.*);

  int checks = 0, failures = 0, base;

  task automatic step(input int lh, input int nblocks, input bit exp_first);
    int cyc_last;
    nrb = 2'(nblocks); ngrp = 3'(lh / 2);
    for (int rb = 0; rb < nblocks; rb++) begin
      @(negedge clk);
      in_valid = 1; in_rb = rb[0];
      for (int k = 0; k < VP; k++) in_val[k] = acc_t'(base + rb * VP + k);
    end
    @(negedge clk); in_valid = 0;
    for (int g = 0; g < lh / 2; g++) begin
      @(posedge clk); #1;
      checks += 3;
      if (!out_valid) begin failures++; $display("FAIL: group %0d missing", g); end
      if (int'(out_grp) != g) begin failures++; $display("FAIL: grp %0d expected %0d", out_grp, g); end
      if (out_first != exp_first) begin failures++; $display("FAIL: out_first %0b", out_first); end
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (out_acc[l] != acc_t'(base + g * LANES + l)) begin
          failures++; $display("FAIL: grp %0d lane %0d = %0d", g, l, out_acc[l]);
        end
      end
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL: extra group"); end
    base += 1000;
  endtask

  initial begin
    start = 0; in_valid = 0; in_rb = 0; in_val = '0; nrb = 2; ngrp = 4; base = 7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    step(8, 2, 1'b1);
    step(8, 2, 1'b0);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    step(4, 1, 1'b1);
    step(4, 1, 1'b0);
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
