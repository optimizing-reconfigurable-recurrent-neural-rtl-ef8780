// tb_weight_buffer: writes random words to every address, reads them back in
// random order and checks the one-cycle read latency and that the output
// holds while rd_en is low.
module tb_weight_buffer;
  localparam int EP = 4, DEPTH = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 we, rd_en;
  logic [4:0]           waddr, rd_addr;
  logic [EP*8-1:0]      wdata, rd_data;
  logic [EP*8-1:0]      model [DEPTH];
  int checks = 0, failures = 0;

  weight_buffer #(.EP(EP), .DEPTH(DEPTH)) dut (.*);

  initial begin
    we = 0; rd_en = 0; waddr = 0; rd_addr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 5'(a); wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 60; i++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      rd_en = 1; rd_addr = 5'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data != model[a]) begin
        failures++; $display("FAIL: addr %0d read %h expected %h", a, rd_data, model[a]);
      end
      // output must hold while rd_en is low, even if the address moves
      rd_en = 0; rd_addr = 5'((a + 1) % DEPTH);
      @(posedge clk); #1;
      checks++;
      if (rd_data != model[a]) begin
        failures++; $display("FAIL: output did not hold at addr %0d", a);
      end
      @(negedge clk);
    end
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
