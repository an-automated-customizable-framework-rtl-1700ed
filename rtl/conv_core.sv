// conv_core: the Conv module - one convolution layer per start.
//
// Operation, for a layer described by the Conv registers (conv_cfg_t):
//  1. LOAD: the input stream (from the read DMA) carries, in order,
//     n_qparams quantization words (one per output channel: bias[31:0],
//     mult[47:32], shift[53:48]), n_weights weight words (for each output
//     group of 8, kernel row, kernel column and input group of 8: eight words,
//     one per output channel, each holding eight input-channel weights) and
//     the input feature map (ceil(in_ch/8)*rows*cols words).  They go to the
//     quantization table, the weight buffer and the feature buffer.  With
//     n_qparams = n_weights = 0 the previous layer's parameters are reused.
//  2. COMPUTE: a window generator walks output group, output row, output
//     column, kernel row, kernel column and input group, issuing one beat per
//     cycle: a feature word (or padding) and an 8x8 weight block for the
//     compute array.  Convolution type 1 (1x1) or 3 (3x3), optional padding
//     of one pixel (3x3 only) and optional stride 2.
//  3. Each finished output pixel is requantized (quantization) into one
//     8-channel word and queued in an output FIFO feeding the output stream
//     (to the write DMA, or straight to the Shape module).
// in_feat is high while the engine waits for feature words, so that a core
// can take its features from another core instead of its read DMA.
// Rate: one 8x8 beat per cycle, so a layer takes
// OG*OH*OW*K*K*CG cycles plus the pipeline depth, unless the output stream
// stalls; issue pauses when the output FIFO could overflow (credit count).
// The document gives the Conv module's parts (weight and feature buffers,
// data preprocessing, compute, quantization), the register fields and the
// 8x8 parallelism; the loop order, stream format and layouts are this
// design's.  The ParamReg field "Number of Z1" and ConvTypeReg "First layer"
// are held in the register file but do not change the computation here.
module conv_core
  import nna_pkg::*;
#(
  parameter int unsigned FB_DEPTH   = 65536,  // feature buffer words
  parameter int unsigned WB_DEPTH   = 8192,   // weight buffer rows (8x8 blocks)
  parameter int unsigned MAX_OUT_CH = 1024,
  parameter int unsigned BUF_LAT    = 2,      // cache unit delay
  parameter int unsigned MUL_LAT    = 3,      // multiplier delay
  parameter int unsigned ADD_LAT    = 1,      // adder delay
  parameter int unsigned OFIFO_DEPTH = 32,
  parameter bit          LEAKY_RELU  = 1'b1    // activation: 1 Leaky ReLU, 0 ReLU
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  conv_cfg_t cfg,
  output logic      busy,
  output logic      done,       // high from the end of a layer to the next start
  // input stream
  input  logic      in_valid,
  output logic      in_ready,
  input  word_t     in_data,
  output logic      in_feat,    // the next input word taken is a feature word
  // output stream
  output logic      out_valid,
  input  logic      out_ready,
  output word_t     out_data
);
  localparam int unsigned FAW = $clog2(FB_DEPTH);
  localparam int unsigned WAW = $clog2(WB_DEPTH);
  localparam int unsigned QROWS = MAX_OUT_CH / LANES;
  localparam int unsigned TAG_W = $clog2(QROWS);

  typedef enum logic [1:0] {C_IDLE, C_LOAD, C_COMPUTE, C_DRAIN} conv_state_e;
  conv_state_e st;
  conv_cfg_t   c;

  // ---------------- layer geometry ----------------
  logic [1:0]  ksz;            // 1 or 3
  logic        padv;
  logic [10:0] oh_n, ow_n;
  logic [7:0]  cg_n, og_n;
  logic [21:0] hw;
  logic [31:0] ld_total;

  // ---------------- load ----------------
  logic [31:0] ld_cnt;
  logic [31:0] ld_w_idx, ld_f_idx;
  assign ld_w_idx = ld_cnt - 32'(c.n_qparams);
  assign ld_f_idx = ld_cnt - 32'(c.n_qparams) - 32'(c.n_weights);
  assign in_ready = (st == C_LOAD);
  wire ld_take = in_valid && in_ready;
  wire ld_is_q = ld_cnt < 32'(c.n_qparams);
  wire ld_is_w = !ld_is_q && (ld_w_idx < 32'(c.n_weights));
  wire ld_is_f = !ld_is_q && !ld_is_w;
  assign in_feat = (st == C_LOAD) && ld_is_f;

  logic [63:0] qp [LANES][QROWS];
  always_ff @(posedge clk) begin
    if (ld_take && ld_is_q) qp[ld_cnt[2:0]][ld_cnt[TAG_W+2:3]] <= in_data;
  end

  // ---------------- window generator ----------------
  logic [7:0]  og, ig;
  logic [10:0] oh, ow;
  logic [1:0]  ky, kx;
  logic [31:0] pending;        // output pixels issued but not yet queued
  logic [$clog2(OFIFO_DEPTH+1)-1:0] ofifo_count;

  logic signed [12:0] ih, iw;
  logic               pad;
  logic [31:0]        faddr_full;
  logic [31:0]        wrow_full;
  logic               beat_first, beat_last, pix_last;

  always_comb begin
    ih = $signed({2'b0, oh} << c.stride2) + $signed({11'd0, ky}) - $signed({12'd0, padv});
    iw = $signed({2'b0, ow} << c.stride2) + $signed({11'd0, kx}) - $signed({12'd0, padv});
    pad = (ih < 0) || (iw < 0) || (ih >= $signed({2'b0, c.in_rows})) || (iw >= $signed({2'b0, c.in_cols}));
    faddr_full = pad ? 32'd0 : 32'(ig) * 32'(hw) + 32'(ih[10:0]) * 32'(c.in_cols) + 32'(iw[10:0]);
    wrow_full  = ((32'(og) * 32'(ksz) + 32'(ky)) * 32'(ksz) + 32'(kx)) * 32'(cg_n) + 32'(ig);
    beat_first = (ky == 2'd0) && (kx == 2'd0) && (ig == 8'd0);
    beat_last  = (ky == ksz - 2'd1) && (kx == ksz - 2'd1) && (ig == cg_n - 8'd1);
    pix_last   = (ow == ow_n - 11'd1) && (oh == oh_n - 11'd1) && (og == og_n - 8'd1);
  end

  wire issue = (st == C_COMPUTE) && ((pending + 32'(ofifo_count)) < 32'(OFIFO_DEPTH));

  // ---------------- buffers ----------------
  word_t              f_rd;
  logic signed [7:0]  w_rd [LANES][LANES];
  logic signed [7:0]  w_q  [LANES][LANES];

  feature_buffer #(.DEPTH(FB_DEPTH), .RD_LAT(BUF_LAT)) u_fbuf (
    .clk,
    .wr_en(ld_take && ld_is_f), .wr_addr(ld_f_idx[FAW-1:0]), .wr_data(in_data),
    .rd_addr(faddr_full[FAW-1:0]), .rd_data(f_rd)
  );

  weight_buffer #(.DEPTH(WB_DEPTH), .RD_LAT(BUF_LAT)) u_wbuf (
    .clk,
    .wr_en(ld_take && ld_is_w), .wr_addr(ld_w_idx[WAW+2:0]), .wr_data(in_data),
    .rd_addr(wrow_full[WAW-1:0]), .rd_w(w_rd)
  );

  // Side band delayed by the buffer latency, then one more for preprocessing.
  logic             sv [BUF_LAT+1];
  logic             sf [BUF_LAT+1];
  logic             sl [BUF_LAT+1];
  logic             sp [BUF_LAT+1];
  logic [TAG_W-1:0] stg [BUF_LAT+1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= BUF_LAT; s++) begin
        sv[s] <= 1'b0; sf[s] <= 1'b0; sl[s] <= 1'b0; sp[s] <= 1'b0; stg[s] <= '0;
      end
    end else begin
      sv[0] <= issue; sf[0] <= beat_first; sl[0] <= beat_last; sp[0] <= pad; stg[0] <= TAG_W'(og);
      for (int s = 1; s <= BUF_LAT; s++) begin
        sv[s] <= sv[s-1]; sf[s] <= sf[s-1]; sl[s] <= sl[s-1]; sp[s] <= sp[s-1]; stg[s] <= stg[s-1];
      end
    end
  end

  always_ff @(posedge clk) w_q <= w_rd;   // align weights with data_preproc

  logic signed [8:0] x [LANES];
  logic              x_valid;
  data_preproc u_pre (
    .clk, .rst_n, .in_valid(sv[BUF_LAT-1]), .in_word(f_rd), .in_pad(sp[BUF_LAT-1]),
    .z1(c.z1), .out_valid(x_valid), .x
  );

  // ---------------- compute and quantization ----------------
  logic              acc_valid;
  logic [TAG_W-1:0]  acc_tag;
  logic signed [31:0] acc [LANES];

  conv_compute #(.PAR_IN(LANES), .PAR_OUT(LANES), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT),
                 .TAG_W(TAG_W)) u_pe (
    .clk, .rst_n, .in_valid(x_valid), .in_first(sf[BUF_LAT]), .in_last(sl[BUF_LAT]),
    .in_tag(stg[BUF_LAT]), .x, .w(w_q), .acc_valid, .acc_tag, .acc
  );

  logic signed [31:0] q_bias [LANES];
  logic [15:0]        q_mult [LANES];
  logic [5:0]         q_shift [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      q_bias[l]  = $signed(qp[l][acc_tag][31:0]);
      q_mult[l]  = qp[l][acc_tag][47:32];
      q_shift[l] = qp[l][acc_tag][53:48];
    end
  end

  logic  qv;
  word_t qword;
  logic [TAG_W-1:0] qtag;
  quantization #(.LEAKY_RELU(LEAKY_RELU), .LANES_P(LANES), .TAG_W(TAG_W)) u_quant (
    .clk, .rst_n, .in_valid(acc_valid), .in_tag(acc_tag), .acc,
    .bias(q_bias), .mult(q_mult), .shift(q_shift), .amend($signed(c.amend)),
    .z3(c.z3), .act_en(c.act_en), .out_valid(qv), .out_tag(qtag), .out_data(qword)
  );

  logic ofifo_in_ready;
  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OFIFO_DEPTH)) u_ofifo (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(qv), .in_ready(ofifo_in_ready), .in_data(qword),
    .out_valid, .out_ready, .out_data, .count(ofifo_count)
  );

  // ---------------- control ----------------
  assign busy = (st != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; c <= '0; done <= 1'b0;
      ksz <= 2'd1; padv <= 1'b0; oh_n <= '0; ow_n <= '0; cg_n <= '0; og_n <= '0; hw <= '0;
      ld_total <= '0; ld_cnt <= '0; pending <= '0;
      og <= '0; ig <= '0; oh <= '0; ow <= '0; ky <= '0; kx <= '0;
    end else begin
      pending <= pending + ((issue && beat_last) ? 32'd1 : 32'd0) - (qv ? 32'd1 : 32'd0);
      unique case (st)
        C_IDLE: if (start) begin
          logic [1:0] k;
          logic       p;
          k = (cfg.conv_type == CONV_3X3) ? 2'd3 : 2'd1;
          p = cfg.pad_en && (k == 2'd3);
          c    <= cfg;
          done <= 1'b0;
          ksz  <= k;
          padv <= p;
          oh_n <= ((cfg.in_rows + {9'd0, p, 1'b0} - 11'(k)) >> cfg.stride2) + 11'd1;
          ow_n <= ((cfg.in_cols + {9'd0, p, 1'b0} - 11'(k)) >> cfg.stride2) + 11'd1;
          cg_n <= 8'(({1'b0, cfg.in_ch} + 11'd7) >> 3);
          og_n <= 8'(({1'b0, cfg.out_ch} + 11'd7) >> 3);
          hw   <= cfg.in_rows * cfg.in_cols;
          ld_total <= 32'(cfg.n_qparams) + 32'(cfg.n_weights)
                    + ((32'(cfg.in_ch) + 32'd7) >> 3) * 32'(cfg.in_rows) * 32'(cfg.in_cols);
          ld_cnt <= '0;
          og <= '0; ig <= '0; oh <= '0; ow <= '0; ky <= '0; kx <= '0;
          st <= C_LOAD;
        end
        C_LOAD: if (ld_take) begin
          ld_cnt <= ld_cnt + 32'd1;
          if (ld_cnt == ld_total - 32'd1) st <= C_COMPUTE;
        end
        C_COMPUTE: if (issue) begin
          if (ig != cg_n - 8'd1) ig <= ig + 8'd1;
          else begin
            ig <= '0;
            if (kx != ksz - 2'd1) kx <= kx + 2'd1;
            else begin
              kx <= '0;
              if (ky != ksz - 2'd1) ky <= ky + 2'd1;
              else begin
                ky <= '0;
                if (pix_last) st <= C_DRAIN;
                if (ow != ow_n - 11'd1) ow <= ow + 11'd1;
                else begin
                  ow <= '0;
                  if (oh != oh_n - 11'd1) oh <= oh + 11'd1;
                  else begin
                    oh <= '0;
                    og <= og + 8'd1;
                  end
                end
              end
            end
          end
        end
        C_DRAIN: if (pending == '0 && ofifo_count == '0) begin
          st   <= C_IDLE;
          done <= 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // The credit count must keep the output FIFO from overflowing.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) qv |-> ofifo_in_ready);
`endif
endmodule
