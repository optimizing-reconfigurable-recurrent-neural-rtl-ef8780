// tb_vector_buffer: EP = 4 reads, NTAIL = 2 writes, 16 elements. Checks the
// zero-point read while init is high, reads of written data at every base,
// the written-element counter and its clear (also clear with a write in the
// same cycle).
module tb_vector_buffer;
  import rnn_pkg::*;

  localparam int EP = 4, NTAIL = 2, MAX_LH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              clr, wr_en, init;
  logic [4:0]        wr_base, rd_base, wr_count;
  q8_t [NTAIL-1:0]   wr_data;
  q8_t [EP-1:0]      rd_data;
  q8_t               zx;
  int model [MAX_LH];
  int checks = 0, failures = 0;

  vector_buffer #(.EP(EP), .NTAIL(NTAIL), .MAX_LH(MAX_LH)) dut (.*);

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    clr = 0; wr_en = 0; init = 1; wr_base = 0; rd_base = 0; wr_data = '0; zx = 8'd77;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      chk(wr_count == 0, "count not cleared");
      for (int g = 0; g < MAX_LH / NTAIL; g++) begin
        @(negedge clk);
        wr_en = 1; wr_base = 5'(g * NTAIL);
        for (int l = 0; l < NTAIL; l++) begin
          model[g*NTAIL + l] = int'($urandom_range(0, 255));
          wr_data[l] = q8_t'(model[g*NTAIL + l]);
        end
        @(posedge clk); #1;
        chk(int'(wr_count) == (g + 1) * NTAIL, $sformatf("count %0d after %0d writes", wr_count, g + 1));
      end
      @(negedge clk); wr_en = 0;
      init = 1;
      for (int b = 0; b < MAX_LH; b += EP) begin
        rd_base = 5'(b); #1;
        for (int e = 0; e < EP; e++) chk(rd_data[e] == zx, "init must read the zero point");
      end
      init = 0;
      for (int b = 0; b < MAX_LH; b += EP) begin
        rd_base = 5'(b); #1;
        for (int e = 0; e < EP; e++)
          chk(int'(rd_data[e]) == model[b + e], $sformatf("h[%0d] = %0d expected %0d", b + e, rd_data[e], model[b + e]));
      end
    end
    // clear together with a write counts only the new write
    @(negedge clk); clr = 1; wr_en = 1; wr_base = 0;
    @(negedge clk); clr = 0; wr_en = 0;
    chk(int'(wr_count) == NTAIL, "clear with write");
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
