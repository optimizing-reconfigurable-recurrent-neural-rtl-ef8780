// vector_buffer: storage of the quantized hidden vector fed back to the MVM.
//
// Holds h_{t-1} as 8-bit values. The tails write NTAIL consecutive elements
// per cycle (wr_base is the first element index); the controller reads EP
// consecutive elements per cycle (rd_base), combinationally, when it issues an
// h tile. A single copy is enough: with column-wise MVM the new h_t only
// starts to arrive after the last tile of timestep t, i.e. after every read
// of h_{t-1} has been issued.
//
// wr_count counts the elements of the current h_t written so far; the
// controller clears it (clr) at the end of each sweep and compares it with
// the end of the tile it wants to read to detect the data hazard. While
// init is high (first timestep) reads return zx, the quantized value of the
// initial state h_{-1} = 0.
//
// The single-buffer scheme and the written-count hazard check are this
// implementation's choice.
module vector_buffer
  import rnn_pkg::*;
#(
  parameter int unsigned EP     = 16,
  parameter int unsigned NTAIL  = 16,
  parameter int unsigned MAX_LH = 1536,
  localparam int unsigned IW    = $clog2(MAX_LH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              wr_en,
  input  logic [IW-1:0]     wr_base,
  input  q8_t [NTAIL-1:0]   wr_data,
  input  logic              init,
  input  q8_t               zx,
  input  logic [IW-1:0]     rd_base,
  output q8_t [EP-1:0]      rd_data,
  output logic [IW-1:0]     wr_count
);

  q8_t mem [MAX_LH];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int l = 0; l < NTAIL; l++) mem[wr_base + IW'(l)] <= wr_data[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     wr_count <= '0;
    else if (clr)   wr_count <= wr_en ? IW'(NTAIL) : '0;
    else if (wr_en) wr_count <= wr_count + IW'(NTAIL);
  end

  always_comb begin
    for (int e = 0; e < EP; e++) rd_data[e] = init ? zx : mem[rd_base + IW'(e)];
  end

endmodule
