// data_preproc: prepares a feature word for the multiply-accumulate array.
//
// Removes the input zero point z1 from each of the eight unsigned 8-bit lanes,
// giving signed 9-bit activations, and forces all lanes to zero for a window
// position that falls in the padding border (so padding acts as the value
// z1, the real zero).  One register stage: outputs follow inputs by one cycle.
// The document names this block ("Data Preprocessing"); what it does here is
// this design's reading of it.
module data_preproc
  import nna_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  word_t             in_word,
  input  logic              in_pad,
  input  logic [7:0]        z1,
  output logic              out_valid,
  output logic signed [8:0] x [LANES]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) x[l] <= '0;
    end else begin
      out_valid <= in_valid;
      for (int l = 0; l < LANES; l++)
        x[l] <= in_pad ? 9'sd0 : $signed({1'b0, in_word[l*8 +: 8]}) - $signed({1'b0, z1});
    end
  end
endmodule
