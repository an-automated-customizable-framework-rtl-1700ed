// add: element-wise addition of two quantized tensors of equal shape.
//
// The DMA reads the two operands in alternating bursts; each word comes
// with src = 0 (operand A) or 1 (operand B).  A words wait in a FIFO of
// AFIFO_DEPTH words (at least one burst); each B word is added lane by lane
// to the oldest A word, both first brought to the output scale:
//   q = sat_u8(zo + round(((a - Z1) * S1 + (b - Z2) * S2) / 2^16))
// (Scale 1/2 and Zero 1/2 registers, Q16.16).  Output registered.  The
// document names the operator and its registers; the formula and the burst
// interleaving are this design's choices.
module add
  import nna_pkg::*;
#(
  parameter int unsigned AFIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] s1,
  input  logic [31:0] s2,
  input  lane_t       z1,
  input  lane_t       z2,
  input  lane_t       zo,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic        in_src,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data
);
  logic  a_valid, a_ready, a_in_ready;
  word_t a_data;
  logic [$clog2(AFIFO_DEPTH+1)-1:0] a_count;

  wire slot = !out_valid || out_ready;
  assign in_ready = in_src ? (slot && a_valid) : a_in_ready;
  wire take_b = in_valid && in_src && in_ready;
  assign a_ready = take_b;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(AFIFO_DEPTH)) u_afifo (
    .clk, .rst_n, .clear(start),
    .in_valid(in_valid && !in_src), .in_ready(a_in_ready), .in_data,
    .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data), .count(a_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0;
    end else if (start) begin
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take_b) begin
        out_valid <= 1'b1;
        for (int l = 0; l < LANES; l++)
          out_data[l*8 +: 8] <= sat_u8(48'(zo) + round_q16(scale_q16(a_data[l*8 +: 8], z1, s1)
                                                         + scale_q16(in_data[l*8 +: 8], z2, s2)));
      end
    end
  end
endmodule
