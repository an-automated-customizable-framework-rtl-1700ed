// shape_core: the Shape module - operators that change feature map shape.
//
// One operator runs per start, chosen by ControlReg[3:1] (shape_op_e):
// max pooling, upsampling, concatenation, split or addition.  The input
// Switch hands the incoming stream to the selected operator and the output
// Switch collects its results into the output stream (to the write DMA).
// The input stream comes from the read DMA, or, when ControlReg[4] is set,
// straight from the Conv module's output.  The operation ends when
// out_words words (the write length / 8) have left; `done` then stays high
// until the next start.  Register use: DataSizeReg = {c1, cols, rows},
// C2Reg = second channel count (concat) or skipped channels (split),
// S1/S2 = Q16.16 scales, Z1/Z2 = input zero points, ControlReg[15:8] = output
// zero point.  The operator set and the two Switches are the document's; the
// encodings are this design's.
module shape_core
  import nna_pkg::*;
#(
  parameter int unsigned MAX_COLS    = 2048,
  parameter int unsigned BURST_BYTES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] ctrl,
  input  logic [31:0] dsize,
  input  logic [31:0] c2,
  input  logic [31:0] s1,
  input  logic [31:0] s2,
  input  logic [31:0] z1,
  input  logic [31:0] z2,
  input  logic [31:0] out_words,
  output logic        busy,
  output logic        done,
  // input stream (with the DMA's half-select for add)
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic        in_src,
  // output stream
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data
);
  localparam int unsigned NOPS = 5;

  shape_op_e   op;
  logic [7:0]  zo;
  logic [9:0]  c1_ch;
  logic [10:0] cols, rows;
  logic [31:0] plane, n1, nskip, ocnt;

  // input switch
  logic  op_in_valid [NOPS];
  logic  op_in_ready [NOPS];
  logic  op_out_valid [NOPS];
  logic  op_out_ready [NOPS];
  word_t op_out_data [NOPS];

  always_comb begin
    for (int i = 0; i < NOPS; i++) begin
      op_in_valid[i]  = busy && in_valid && (op == shape_op_e'(i));
      op_out_ready[i] = busy && out_ready && (op == shape_op_e'(i));
    end
    in_ready  = busy && op_in_ready[op];
    out_valid = busy && op_out_valid[op];
    out_data  = op_out_data[op];
  end

  maxpool #(.MAX_COLS(MAX_COLS)) u_maxpool (
    .clk, .rst_n, .start, .rows, .cols,
    .in_valid(op_in_valid[SHP_MAXPOOL]), .in_ready(op_in_ready[SHP_MAXPOOL]), .in_data,
    .out_valid(op_out_valid[SHP_MAXPOOL]), .out_ready(op_out_ready[SHP_MAXPOOL]),
    .out_data(op_out_data[SHP_MAXPOOL])
  );

  upsample #(.MAX_COLS(MAX_COLS)) u_upsample (
    .clk, .rst_n, .start, .cols,
    .in_valid(op_in_valid[SHP_UPSAMPLE]), .in_ready(op_in_ready[SHP_UPSAMPLE]), .in_data,
    .out_valid(op_out_valid[SHP_UPSAMPLE]), .out_ready(op_out_ready[SHP_UPSAMPLE]),
    .out_data(op_out_data[SHP_UPSAMPLE])
  );

  concat u_concat (
    .clk, .rst_n, .start, .n1, .s1, .s2, .z1(z1[7:0]), .z2(z2[7:0]), .zo,
    .in_valid(op_in_valid[SHP_CONCAT]), .in_ready(op_in_ready[SHP_CONCAT]), .in_data,
    .out_valid(op_out_valid[SHP_CONCAT]), .out_ready(op_out_ready[SHP_CONCAT]),
    .out_data(op_out_data[SHP_CONCAT])
  );

  split u_split (
    .clk, .rst_n, .start, .n_skip(nskip),
    .in_valid(op_in_valid[SHP_SPLIT]), .in_ready(op_in_ready[SHP_SPLIT]), .in_data,
    .out_valid(op_out_valid[SHP_SPLIT]), .out_ready(op_out_ready[SHP_SPLIT]),
    .out_data(op_out_data[SHP_SPLIT])
  );

  add #(.AFIFO_DEPTH(BURST_BYTES / 8)) u_add (
    .clk, .rst_n, .start, .s1, .s2, .z1(z1[7:0]), .z2(z2[7:0]), .zo,
    .in_valid(op_in_valid[SHP_ADD]), .in_ready(op_in_ready[SHP_ADD]), .in_data, .in_src,
    .out_valid(op_out_valid[SHP_ADD]), .out_ready(op_out_ready[SHP_ADD]),
    .out_data(op_out_data[SHP_ADD])
  );

  assign plane = 32'(rows) * 32'(cols);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; op <= SHP_MAXPOOL; zo <= '0;
      c1_ch <= '0; cols <= '0; rows <= '0; n1 <= '0; nskip <= '0; ocnt <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        done  <= 1'b0;
        op    <= shape_op_e'(ctrl[3:1]);
        zo    <= ctrl[15:8];
        c1_ch <= dsize[31:22];
        cols  <= dsize[21:11];
        rows  <= dsize[10:0];
        n1    <= 32'(({22'd0, dsize[31:22]} + 32'd7) >> 3) * 32'(dsize[21:11]) * 32'(dsize[10:0]);
        nskip <= 32'(({22'd0, c2[9:0]} + 32'd7) >> 3) * 32'(dsize[21:11]) * 32'(dsize[10:0]);
        ocnt  <= out_words;
      end
    end else if (out_valid && out_ready) begin
      ocnt <= ocnt - 32'd1;
      if (ocnt == 32'd1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
