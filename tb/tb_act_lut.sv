// tb_act_lut: sweeps all 2048 table entries of the sigmoid and the tanh
// table (two random inputs inside each step) and compares with values
// computed here from exp(); also checks the one-cycle latency.
module tb_act_lut;
  import rnn_pkg::*;
  import lstm_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fx_t x, ys, yt;
  int checks = 0, failures = 0;

  act_lut #(.FUNC(ACT_SIGMOID)) u_s (.clk(clk), .x(x), .y(ys));
  act_lut #(.FUNC(ACT_TANH))    u_t (.clk(clk), .x(x), .y(yt));

  initial begin
    x = '0;
    for (int k = -1024; k < 1024; k++) begin
      for (int rep = 0; rep < 2; rep++) begin
        int xv;
        xv = k * 32 + int'($urandom_range(0, 31));
        @(negedge clk);
        x = fx_t'(xv);
        @(posedge clk); #1;
        checks += 2;
        if (int'(ys) != sigm(xv)) begin
          failures++; $display("FAIL: sigmoid(%0d) = %0d expected %0d", xv, ys, sigm(xv));
        end
        if (int'(yt) != tnh(xv)) begin
          failures++; $display("FAIL: tanh(%0d) = %0d expected %0d", xv, yt, tnh(xv));
        end
      end
    end
    // spot values: sigmoid(0) ~ 0.5, tanh(large) ~ 1
    @(negedge clk); x = fx_t'(0);
    @(posedge clk); #1;
    checks++;
    if (ys < 2048 || ys > 2070) begin failures++; $display("FAIL: sigmoid(0) = %0d", ys); end
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
