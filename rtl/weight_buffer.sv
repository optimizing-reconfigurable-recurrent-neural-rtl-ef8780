// weight_buffer: on-chip weight memory of one MVM kernel.
//
// Each kernel owns the rows of the combined LSTM weight matrix that map onto
// it (rows r with r mod VP == kernel index). A word holds the EP 8-bit
// weights of one (EP x 1) slice of one row inside one column tile, so a
// kernel reads one word per cycle to process one tile. Word address is
// ctile * NRB + rb, where rb = r / VP is the row block, i.e. the row blocks
// of a column tile are stored next to each other. The design keeps all
// weights on chip; the depth and this address layout are this
// implementation's choice.
//
// Interface: one synchronous write port (loading), one read port with one
// cycle of latency (rd_en/rd_addr in cycle n, rd_data valid in cycle n+1).
module weight_buffer #(
  parameter int unsigned EP     = 16,
  parameter int unsigned DEPTH  = 1152,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned DW    = EP * 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
