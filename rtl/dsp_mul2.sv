// dsp_mul2: two 8-bit multiplications in one (A+D)xB multiplier.
//
// Following the DSP multiplexing scheme of the document, two weights that
// share one activation are packed into a single wide operand,
// P = (wa * 2^18 + wd) * x, so one 27x18 DSP multiplier computes both
// wa*x and wd*x.  The low product occupies P[17:0] as a signed 18-bit field;
// the high product is (P - sext(P[17:0])) >>> 18.  Weights are signed 8-bit,
// the activation is a signed 9-bit value (an unsigned 8-bit pixel minus its
// zero point), so each product fits 17 bits and never corrupts the other.
// The 18-bit field offset is this design's choice.
// Timing: the product is registered LAT times (LAT >= 1); the outputs follow
// the inputs by LAT cycles.  The document's default multiplier delay is 3.
module dsp_mul2 #(
  parameter int unsigned LAT = 3
) (
  input  logic               clk,
  input  logic signed [7:0]  wa,
  input  logic signed [7:0]  wd,
  input  logic signed [8:0]  x,
  output logic signed [16:0] pa,
  output logic signed [16:0] pd
);
  localparam int unsigned SH = 18;
  logic signed [26:0] packed_ad;   // A+D pre-adder output (27 bits)
  logic signed [35:0] prod;
  logic signed [35:0] pipe [LAT];

  assign packed_ad = (27'(wa) <<< SH) + 27'(wd);
  assign prod      = packed_ad * 36'(x);

  always_ff @(posedge clk) begin
    pipe[0] <= prod;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  logic signed [17:0] lo;
  logic signed [35:0] hi;
  assign lo = pipe[LAT-1][17:0];
  assign hi = (pipe[LAT-1] - 36'(lo)) >>> SH;
  assign pd = 17'(lo);
  assign pa = 17'(hi);
endmodule
