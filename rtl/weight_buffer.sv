// weight_buffer: on-chip weight cache of the Conv module.
//
// Written one 64-bit word at a time (eight input-channel weights of one
// output channel) and read one row at a time: a row holds the 8x8 weight
// block that the compute array uses in one beat, i.e. eight consecutive
// words.  Built as eight banks; word index j goes to bank j%8, row j/8.
// Reads have RD_LAT cycles of latency (the document's default cache delay
// is 2).  DEPTH rows of 512 bits: the 8192-row default is 512 KiB, half of the
// document's default 1 MiB on-chip cache (the split is this design's choice).
module weight_buffer
  import nna_pkg::*;
#(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned RD_LAT = 2
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)+2:0]  wr_addr,   // word index
  input  word_t                     wr_data,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,   // row index
  output logic signed [7:0]         rd_w [LANES][LANES]  // [out ch][in ch]
);
  localparam int unsigned AW = $clog2(DEPTH);
  word_t bank [LANES][DEPTH];
  word_t rd_q [RD_LAT][LANES];

  always_ff @(posedge clk) begin
    if (wr_en) bank[wr_addr[2:0]][wr_addr[AW+2:3]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < LANES; b++) rd_q[0][b] <= bank[b][rd_addr];
    for (int s = 1; s < RD_LAT; s++) rd_q[s] <= rd_q[s-1];
  end

  always_comb begin
    for (int o = 0; o < LANES; o++)
      for (int i = 0; i < LANES; i++)
        rd_w[o][i] = $signed(rd_q[RD_LAT-1][o][i*8 +: 8]);
  end
endmodule
