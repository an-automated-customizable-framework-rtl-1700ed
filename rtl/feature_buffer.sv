// feature_buffer: on-chip feature map cache of the Conv module.
//
// A simple dual-port memory of 64-bit words (one pixel, eight channels),
// written by the input stream and read by the convolution window generator.
// Reads have RD_LAT cycles of latency (the document's default cache delay is
// 2).  The 65536-word default is 512 KiB, half of the document's default
// 1 MiB on-chip cache (the split is this design's choice).
module feature_buffer
  import nna_pkg::*;
#(
  parameter int unsigned DEPTH  = 65536,
  parameter int unsigned RD_LAT = 2
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  word_t                    wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output word_t                    rd_data
);
  word_t mem [DEPTH];
  word_t rd_q [RD_LAT];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    rd_q[0] <= mem[rd_addr];
    for (int s = 1; s < RD_LAT; s++) rd_q[s] <= rd_q[s-1];
  end

  assign rd_data = rd_q[RD_LAT-1];
endmodule
