// conv_compute: the 8x8 multiply-accumulate array of the Conv module.
//
// Every valid beat multiplies one word of PAR_IN activations by a
// PAR_OUT x PAR_IN block of weights and adds the PAR_IN products of each
// output channel into that channel's accumulator.  The multipliers are
// dsp_mul2 instances: each one serves a pair of output channels that share an
// activation, so PAR_OUT*PAR_IN MACs use half as many multipliers, as in the
// document's DSP multiplexing.  A beat flagged `first` restarts the
// accumulators, a beat flagged `last` makes the array emit them on acc_valid
// with the beat's tag.  Latency from a beat to its contribution: MUL_LAT
// (multiplier) + ADD_LAT (adder tree registers) + 1 (accumulator).
// The document gives the 8x8 default and the 3/1 multiplier and adder
// delays; the adder tree form and the tag side band are this design's own.
module conv_compute #(
  parameter int unsigned PAR_IN  = 8,
  parameter int unsigned PAR_OUT = 8,
  parameter int unsigned MUL_LAT = 3,
  parameter int unsigned ADD_LAT = 1,
  parameter int unsigned TAG_W   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic [TAG_W-1:0]         in_tag,
  input  logic signed [8:0]        x [PAR_IN],
  input  logic signed [7:0]        w [PAR_OUT][PAR_IN],
  output logic                     acc_valid,
  output logic [TAG_W-1:0]         acc_tag,
  output logic signed [31:0]       acc [PAR_OUT]
);
  localparam int unsigned CTRL_LAT = MUL_LAT + ADD_LAT;
  logic signed [16:0] prod [PAR_OUT][PAR_IN];

  for (genvar o = 0; o < PAR_OUT; o += 2) begin : g_pair
    for (genvar i = 0; i < PAR_IN; i++) begin : g_in
      dsp_mul2 #(.LAT(MUL_LAT)) u_mul (
        .clk, .wa(w[o+1][i]), .wd(w[o][i]), .x(x[i]),
        .pa(prod[o+1][i]), .pd(prod[o][i])
      );
    end
  end

  // Adder tree over the input channels, then ADD_LAT register stages.
  logic signed [31:0] sum_c [PAR_OUT];
  logic signed [31:0] sum_p [ADD_LAT][PAR_OUT];
  always_comb begin
    for (int o = 0; o < PAR_OUT; o++) begin
      sum_c[o] = '0;
      for (int i = 0; i < PAR_IN; i++) sum_c[o] += 32'(prod[o][i]);
    end
  end
  always_ff @(posedge clk) begin
    sum_p[0] <= sum_c;
    for (int s = 1; s < ADD_LAT; s++) sum_p[s] <= sum_p[s-1];
  end

  // Control side band delayed to line up with the sums.
  logic             v_d [CTRL_LAT];
  logic             f_d [CTRL_LAT];
  logic             l_d [CTRL_LAT];
  logic [TAG_W-1:0] t_d [CTRL_LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < CTRL_LAT; s++) begin
        v_d[s] <= 1'b0; f_d[s] <= 1'b0; l_d[s] <= 1'b0; t_d[s] <= '0;
      end
    end else begin
      v_d[0] <= in_valid; f_d[0] <= in_first; l_d[0] <= in_last; t_d[0] <= in_tag;
      for (int s = 1; s < CTRL_LAT; s++) begin
        v_d[s] <= v_d[s-1]; f_d[s] <= f_d[s-1]; l_d[s] <= l_d[s-1]; t_d[s] <= t_d[s-1];
      end
    end
  end

  logic signed [31:0] acc_r [PAR_OUT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_valid <= 1'b0;
      acc_tag   <= '0;
      for (int o = 0; o < PAR_OUT; o++) begin
        acc_r[o] <= '0;
        acc[o]   <= '0;
      end
    end else begin
      acc_valid <= 1'b0;
      if (v_d[CTRL_LAT-1]) begin
        for (int o = 0; o < PAR_OUT; o++) begin
          acc_r[o] <= (f_d[CTRL_LAT-1] ? 32'sd0 : acc_r[o]) + sum_p[ADD_LAT-1][o];
          if (l_d[CTRL_LAT-1])
            acc[o] <= (f_d[CTRL_LAT-1] ? 32'sd0 : acc_r[o]) + sum_p[ADD_LAT-1][o];
        end
        if (l_d[CTRL_LAT-1]) begin
          acc_valid <= 1'b1;
          acc_tag   <= t_d[CTRL_LAT-1];
        end
      end
    end
  end
endmodule
