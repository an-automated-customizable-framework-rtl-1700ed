// concat: channel concatenation of two quantized tensors.
//
// The two inputs lie one after the other in memory (the first with c1
// channels, then the second), so in the channel-group-major layout the
// concatenation is the stream of both.  Because the two inputs carry their
// own scales and zero points, every lane is requantized to the output's:
//   q = sat_u8(zo + round((x - Z) * S / 2^16))
// with (S1, Z1) for the first n1 = c1/8*rows*cols words and (S2, Z2) after
// them (Scale 1/2 and Zero 1/2 registers; scales are Q16.16).  Output is
// registered.  start clears the word counter.  The document names the
// operator and its scale and zero registers; the formula is this design's.
module concat
  import nna_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] n1,        // words of the first input
  input  logic [31:0] s1,
  input  logic [31:0] s2,
  input  lane_t       z1,
  input  lane_t       z2,
  input  lane_t       zo,
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
  wire second = (cnt >= n1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; out_valid <= 1'b0; out_data <= '0;
    end else if (start) begin
      cnt <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        cnt <= cnt + 32'd1;
        out_valid <= 1'b1;
        for (int l = 0; l < LANES; l++)
          out_data[l*8 +: 8] <= sat_u8(48'(zo) + round_q16(second ? scale_q16(in_data[l*8 +: 8], z2, s2)
                                                                   : scale_q16(in_data[l*8 +: 8], z1, s1)));
      end
    end
  end
endmodule
