// split: channel split of a tensor.
//
// Passes only the channels from c2 upward of a tensor read whole: in the
// channel-group-major layout that means dropping the first
// n_skip = c2/8*rows*cols words of the stream and forwarding the rest
// unchanged (same scale, so no requantization).  YOLOv4-Tiny's route-group
// layers keep the upper half of the channels this way.  Output registered;
// start clears the counter.  The document names the operator; which part is
// kept is this design's reading of the C1/C2 channel registers.
module split
  import nna_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] n_skip,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data
);
  logic [31:0] cnt;
  assign in_ready = !out_valid || out_ready;
  wire take = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; out_valid <= 1'b0; out_data <= '0;
    end else if (start) begin
      cnt <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        if (cnt < n_skip) cnt <= cnt + 32'd1;
        else begin
          out_valid <= 1'b1;
          out_data  <= in_data;
        end
      end
    end
  end
endmodule
