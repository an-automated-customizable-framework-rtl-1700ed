// maxpool: 2x2 max pooling with stride 2 on a stream of feature words.
//
// Input words arrive channel-group major, row by row (rows x cols pixels per
// group of eight channels).  On even rows the maximum of each horizontal pair
// is kept in a line buffer of cols/2 words; on odd rows the pair maximum is
// combined with the stored one and emitted.  Per lane, unsigned maximum.  An
// odd last row or column is dropped (floor).  Output: one registered word
// per 2x2 window, in the same layout with rows/2 x cols/2 pixels.
// start clears the position counters.  The document names the operator;
// the 2x2/stride-2 window (the one YOLOv4-Tiny uses) and the line-buffer
// structure are this design's choices.
module maxpool
  import nna_pkg::*;
#(
  parameter int unsigned MAX_COLS = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [10:0] rows,
  input  logic [10:0] cols,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data
);
  word_t line [MAX_COLS/2];
  word_t hold;
  logic [10:0] r, c;

  function automatic word_t vmax(word_t a, word_t b);
    word_t m;
    for (int l = 0; l < LANES; l++)
      m[l*8 +: 8] = (a[l*8 +: 8] > b[l*8 +: 8]) ? a[l*8 +: 8] : b[l*8 +: 8];
    return m;
  endfunction

  assign in_ready = !out_valid || out_ready;
  wire take = in_valid && in_ready;
  wire pair_done = c[0];

  always_ff @(posedge clk) begin
    if (take && pair_done && !r[0]) line[c[10:1]] <= vmax(hold, in_data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; c <= '0; hold <= '0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (start) begin
        r <= '0; c <= '0; out_valid <= 1'b0;
      end else if (take) begin
        if (!pair_done) hold <= in_data;
        if (pair_done && r[0]) begin
          out_valid <= 1'b1;
          out_data  <= vmax(line[c[10:1]], vmax(hold, in_data));
        end
        if (c == cols - 11'd1) begin
          c <= '0;
          r <= (r == rows - 11'd1) ? '0 : r + 11'd1;
        end else begin
          c <= c + 11'd1;
        end
      end
    end
  end
endmodule
