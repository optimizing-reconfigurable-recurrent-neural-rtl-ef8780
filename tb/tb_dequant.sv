// tb_dequant: loads random biases, drives random accumulator values (small
// ones and ones large enough to saturate) and checks the Q3.12 outputs
// against the reference formula, one cycle after the input.
module tb_dequant;
  import rnn_pkg::*;
  import lstm_ref_pkg::*;

  localparam int LANES = 8, MAX_ROWS = 32, NGRP = MAX_ROWS / LANES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]        dq_mult;
  logic [4:0]         dq_shift;
  logic               b_we;
  logic [5:0]         b_row;
  fx_t                b_val;
  logic               in_valid, out_valid;
  logic [1:0]         in_grp, out_grp;
  acc_t [LANES-1:0]   in_acc;
  fx_t  [LANES-1:0]   out_fx;
  int bias [MAX_ROWS];
  int checks = 0, failures = 0, sat_seen = 0;

  dequant #(.LANES(LANES), .MAX_ROWS(MAX_ROWS)) dut (.*);

  initial begin
    b_we = 0; b_row = 0; b_val = 0; in_valid = 0; in_grp = 0; in_acc = '0;
    dq_mult = 16'd85; dq_shift = 5'd8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < MAX_ROWS; r++) begin
      @(negedge clk);
      b_we = 1; b_row = 6'(r);
      bias[r] = int'($urandom_range(0, 8000)) - 4000;
      b_val = fx_t'(bias[r]);
    end
    @(negedge clk); b_we = 0;
    for (int i = 0; i < 200; i++) begin
      int g;
      g = int'($urandom_range(0, NGRP - 1));
      if (i == 100) begin dq_mult = 16'd3; dq_shift = 5'd0; end
      @(negedge clk);
      in_valid = 1; in_grp = 2'(g);
      for (int l = 0; l < LANES; l++)
        in_acc[l] = (i % 4 == 3) ? acc_t'($urandom) : acc_t'(int'($urandom_range(0, 200000)) - 100000);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_grp != 2'(g)) begin failures++; $display("FAIL: valid/grp"); end
      for (int l = 0; l < LANES; l++) begin
        int e;
        e = dequant(longint'(in_acc[l]), int'(dq_mult), int'(dq_shift), bias[g*LANES + l]);
        if (e == 32767 || e == -32768) sat_seen++;
        checks++;
        if (int'(out_fx[l]) != e) begin
          failures++; $display("FAIL: acc %0d lane %0d -> %0d expected %0d", in_acc[l], l, out_fx[l], e);
        end
      end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL: valid did not drop"); end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
