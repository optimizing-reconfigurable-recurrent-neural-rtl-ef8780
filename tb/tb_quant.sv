// tb_quant: random Q3.12 hidden values, including ones that clamp at 0 and
// 255, checked against q = clamp(floor(h * mult / 2^shift) + zx, 0, 255)
// one cycle after the input.
module tb_quant;
  import rnn_pkg::*;
  import lstm_ref_pkg::*;

  localparam int LANES = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]      q_mult;
  logic [4:0]       q_shift;
  q8_t              zx;
  logic             in_valid, out_valid;
  fx_t  [LANES-1:0] in_fx;
  q8_t  [LANES-1:0] out_q;
  int checks = 0, failures = 0, lo = 0, hi = 0;

  quant #(.LANES(LANES)) dut (.*);

  initial begin
    in_valid = 0; in_fx = '0; q_mult = 16'd127; q_shift = 5'd12; zx = 8'd128;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      if (i == 150) begin q_mult = 16'd200; q_shift = 5'd11; zx = 8'd60; end
      @(negedge clk);
      in_valid = 1;
      for (int l = 0; l < LANES; l++) in_fx[l] = fx_t'($urandom);
      @(posedge clk); #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid low"); end
      for (int l = 0; l < LANES; l++) begin
        int e;
        e = quant(int'(in_fx[l]), int'(q_mult), int'(q_shift), int'(zx));
        if (e == 0) lo++;
        if (e == 255) hi++;
        checks++;
        if (int'(out_q[l]) != e) begin
          failures++; $display("FAIL: h %0d -> %0d expected %0d", in_fx[l], out_q[l], e);
        end
      end
    end
    checks++;
    if (lo == 0 || hi == 0) begin failures++; $display("FAIL: clamping not exercised"); end
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
