// upsample: 2x nearest-neighbour upsampling on a stream of feature words.
//
// For each input row of cols words, every word is emitted twice as it
// arrives (and stored in a line buffer); the row is then replayed from the
// buffer, each word twice again, giving two output rows of 2*cols words.
// The input is held off while a word is repeated and during the replay.
// Rows and channel groups need no counting beyond the column position.
// Output is registered.  start clears the state.  The document names the
// operator; the factor 2 (the one YOLOv4-Tiny uses) and the structure are
// this design's choices.
module upsample
  import nna_pkg::*;
#(
  parameter int unsigned MAX_COLS = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [10:0] cols,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data
);
  word_t line [MAX_COLS];
  logic [10:0] c;        // column in the first pass
  logic        dup;      // second copy of the current word pending
  logic        replay;   // replaying the stored row
  logic [11:0] j;        // replay output index (0 .. 2*cols-1)

  wire slot = !out_valid || out_ready;        // output register free next
  assign in_ready = slot && !dup && !replay;
  wire take = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (take) line[c] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; dup <= 1'b0; replay <= 1'b0; j <= '0;
      out_valid <= 1'b0; out_data <= '0;
    end else if (start) begin
      c <= '0; dup <= 1'b0; replay <= 1'b0; j <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_data  <= in_data;
        dup       <= 1'b1;
      end else if (dup && slot) begin
        out_valid <= 1'b1;           // out_data still holds the word
        dup       <= 1'b0;
        if (c == cols - 11'd1) begin
          c <= '0; replay <= 1'b1; j <= '0;
        end else begin
          c <= c + 11'd1;
        end
      end else if (replay && slot) begin
        out_valid <= 1'b1;
        out_data  <= line[j[11:1]];
        if (j == {cols, 1'b0} - 12'd1) replay <= 1'b0;
        j <= j + 12'd1;
      end
    end
  end
endmodule
