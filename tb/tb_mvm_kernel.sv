// tb_mvm_kernel: one kernel with EP = 4, three row blocks and five column
// tiles. Random weights and vectors are pushed in the column-tile-outer,
// row-block-inner order of the controller, with the shared zero-point
// correction computed here. Each row block's result must equal
// sum((w - zw)(x - zx)) and must appear exactly 3 + log2(EP) cycles after
// its last tile was issued. Two sweeps run back to back (accumulator restart).
module tb_mvm_kernel;
  import rnn_pkg::*;

  localparam int EP = 4, WDEPTH = 16, NRB_MAX = 3, NCT = 5, LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            w_we, in_valid, in_first, in_last, out_valid;
  logic [3:0]      w_addr, in_addr;
  logic [EP*8-1:0] w_data;
  q8_t [EP-1:0]    in_x;
  logic [1:0]      in_rb, out_rb;
  acc_t            in_corr, out_val;
  q8_t             zx;

  mvm_kernel #(.EP(EP), .WDEPTH(WDEPTH), .NRB_MAX(NRB_MAX)) dut (.*);

  int W [NRB_MAX][NCT*EP];
  int V [NCT*EP];
  int zw;
  int checks = 0, failures = 0, cyc = 0, seen = 0;
  int exp_val [3][NRB_MAX];
  int exp_cyc [3][NRB_MAX];
  int nsweep = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (out_valid) begin
      checks += 2;
      if (out_val != exp_val[seen / NRB_MAX][out_rb]) begin
        failures++; $display("FAIL: rb %0d = %0d expected %0d", out_rb, out_val, exp_val[seen / NRB_MAX][out_rb]);
      end
      if (cyc != exp_cyc[seen / NRB_MAX][out_rb] + LAT) begin
        failures++; $display("FAIL: rb %0d at cycle %0d expected %0d", out_rb, cyc, exp_cyc[seen / NRB_MAX][out_rb] + LAT);
      end
      seen++;
    end
  end

  task automatic sweep();
    int xsum;
    for (int k = 0; k < NCT*EP; k++) V[k] = int'($urandom_range(0, 255));
    xsum = 0;
    for (int k = 0; k < NCT*EP; k++) xsum += V[k];
    for (int rb = 0; rb < NRB_MAX; rb++) begin
      exp_val[nsweep][rb] = 0;
      for (int k = 0; k < NCT*EP; k++) exp_val[nsweep][rb] += (W[rb][k] - zw) * (V[k] - int'(zx));
    end
    for (int ct = 0; ct < NCT; ct++) begin
      for (int rb = 0; rb < NRB_MAX; rb++) begin
        @(negedge clk);
        in_valid = 1; in_addr = 4'(ct * NRB_MAX + rb); in_rb = 2'(rb);
        in_first = (ct == 0); in_last = (ct == NCT - 1);
        for (int e = 0; e < EP; e++) in_x[e] = q8_t'(V[ct*EP + e]);
        in_corr = acc_t'(NCT * EP * zw * int'(zx) - zw * xsum);
        if (in_last) exp_cyc[nsweep][rb] = cyc;
      end
    end
    nsweep++;
  endtask

  task automatic idle();
    @(negedge clk); in_valid = 0; in_last = 0;
  endtask

  initial begin
    w_we = 0; w_addr = 0; w_data = 0; in_valid = 0; in_first = 0; in_last = 0;
    in_addr = 0; in_x = '0; in_rb = 0; in_corr = 0;
    zx = 8'd120; zw = 131;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rb = 0; rb < NRB_MAX; rb++)
      for (int k = 0; k < NCT*EP; k++) W[rb][k] = int'($urandom_range(0, 255));
    for (int ct = 0; ct < NCT; ct++)
      for (int rb = 0; rb < NRB_MAX; rb++) begin
        @(negedge clk);
        w_we = 1; w_addr = 4'(ct * NRB_MAX + rb);
        for (int e = 0; e < EP; e++) w_data[e*8 +: 8] = 8'(W[rb][ct*EP + e]);
      end
    @(negedge clk); w_we = 0;
    sweep();
    idle();
    repeat (8) @(negedge clk);
    sweep();   // the next sweep follows with no idle cycle
    sweep();
    idle();
    repeat (10) @(negedge clk);
    checks++;
    if (seen != 3 * NRB_MAX) begin failures++; $display("FAIL: %0d results, expected %0d", seen, 3 * NRB_MAX); end
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
