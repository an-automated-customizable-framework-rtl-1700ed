// quantization: requantizes the accumulators of one output pixel to 8 bits.
//
// For each lane (output channel) the accumulator, computed from activations
// with their zero point removed and signed weights, is turned back into an
// unsigned 8-bit activation:
//   y = (acc + bias) * mult + amend
//   y = y * 13 / 128          if the activation is on and y < 0 (Leaky ReLU)
//   q = sat_u8(round(y / 2^shift) + z3)
// bias, mult and shift are per output channel (the quantization parameters
// loaded with the weights); amend, z3 and the activation enable are per
// layer (AmendmentReg and ParamReg).  Leaky ReLU is the document's default
// activation and ReLU (LEAKY_RELU = 0) the alternative the document lists,
// chosen when the design is built; the 13/128 slope (about 0.1), the formula and the field widths
// are this design's choices.  Two register stages: out_valid follows
// in_valid by 2 cycles; the tag travels with the data.
module quantization
  import nna_pkg::*;
#(
  parameter int unsigned LANES_P = 8,
  parameter int unsigned TAG_W   = 8,
  parameter bit          LEAKY_RELU = 1'b1  // 1: Leaky ReLU, 0: ReLU
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [TAG_W-1:0]    in_tag,
  input  logic signed [31:0]  acc   [LANES_P],
  input  logic signed [31:0]  bias  [LANES_P],
  input  logic [15:0]         mult  [LANES_P],
  input  logic [5:0]          shift [LANES_P],
  input  logic signed [31:0]  amend,
  input  logic [7:0]          z3,
  input  logic                act_en,
  output logic                out_valid,
  output logic [TAG_W-1:0]    out_tag,
  output logic [LANES_P*8-1:0] out_data
);
  logic signed [47:0] y1 [LANES_P];
  logic [5:0]         sh1 [LANES_P];
  logic               v1, act1;
  logic [7:0]         z31;
  logic [TAG_W-1:0]   t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; t1 <= '0; act1 <= 1'b0; z31 <= '0; out_valid <= 1'b0; out_tag <= '0; out_data <= '0;
      for (int l = 0; l < LANES_P; l++) begin y1[l] <= '0; sh1[l] <= '0; end
    end else begin
      v1   <= in_valid;
      t1   <= in_tag;
      act1 <= act_en;
      z31  <= z3;
      for (int l = 0; l < LANES_P; l++) begin
        y1[l]  <= (48'(acc[l]) + 48'(bias[l])) * $signed({1'b0, mult[l]}) + 48'(amend);
        sh1[l] <= shift[l];
      end
      out_valid <= v1;
      out_tag   <= t1;
      for (int l = 0; l < LANES_P; l++) begin
        logic signed [47:0] a, r;
        if (act1 && y1[l] < 0) a = LEAKY_RELU ? (y1[l] * 48'sd13) >>> 7 : 48'sd0;
        else                   a = y1[l];
        r = (sh1[l] == 0) ? a : (a + (48'sd1 <<< (sh1[l] - 6'd1))) >>> sh1[l];
        out_data[l*8 +: 8] <= sat_u8(r + 48'(z31));
      end
    end
  end
endmodule
