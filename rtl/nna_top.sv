// nna_top: single-core neural network accelerator.
//
// The host writes weights and feature maps into external memory and sends
// instructions; the Instruction module turns them into register writes and
// waits; the Control and Status Registers configure and start the Conv module
// (convolution + quantization) and the Shape module (pooling, upsampling,
// concatenation, split, addition).  Each module has its own DMA engine; the
// two share the external memory port through mem_arbiter.  The Conv module's
// output can also go straight into the Shape module, skipping the round trip
// through memory: set Conv ControlReg[1] (send to Shape) and Shape
// ControlReg[4] (take from Conv).  For multi-core use the Conv output can
// instead go to other cores (ControlReg[2]), and the Conv feature input can
// come from another core (ControlReg[3], core number in ControlReg[7:4]);
// see nna_multicore.  A module reports busy (StateReg, WAIT, idle) until its
// last result has been written to memory.
// Interfaces: host instruction stream (valid/ready, instr_t), a host register
// read port (combinational), the external memory port (simplified AXI:
// read/write address channels with beats-1 length, 64-bit data channels) and
// the inter-core stream ports (valid/ready).
// The block structure follows the document's accelerator diagram; parameter
// defaults are the document's defaults (32-byte bursts, cache delay 2,
// multiplier delay 3, adder delay 1, 8x8 parallelism, 1 MiB on-chip cache).
module nna_top
  import nna_pkg::*;
#(
  parameter int unsigned BURST_BYTES = 32,
  parameter int unsigned FB_DEPTH    = 65536,
  parameter int unsigned WB_DEPTH    = 8192,
  parameter int unsigned BUF_LAT     = 2,
  parameter int unsigned MUL_LAT     = 3,
  parameter int unsigned ADD_LAT     = 1,
  parameter int unsigned MAX_COLS    = 2048,
  parameter bit          LEAKY_RELU  = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // host
  input  logic        instr_valid,
  output logic        instr_ready,
  input  instr_t      instr_data,
  input  logic [7:0]  host_rd_addr,
  output logic [31:0] host_rd_data,
  output logic        idle,
  // external memory
  output logic        ar_valid,
  input  logic        ar_ready,
  output logic [31:0] ar_addr,
  output logic [7:0]  ar_len,
  input  logic        r_valid,
  output logic        r_ready,
  input  word_t       r_data,
  input  logic        r_last,
  output logic        aw_valid,
  input  logic        aw_ready,
  output logic [31:0] aw_addr,
  output logic [7:0]  aw_len,
  output logic        w_valid,
  input  logic        w_ready,
  output word_t       w_data,
  output logic        w_last,
  // Conv output and feature input shared with other cores
  output logic        chain_out_valid,
  input  logic        chain_out_ready,
  output word_t       chain_out_data,
  input  logic        chain_in_valid,
  output logic        chain_in_ready,
  input  word_t       chain_in_data,
  output logic        chain_listen,   // this core takes its features from core chain_src
  output logic [3:0]  chain_src
);
  // ---------------- instruction and registers ----------------
  logic        reg_wr_en;
  logic [7:0]  reg_wr_addr;
  logic [31:0] reg_wr_data;
  logic        instr_idle;
  logic [31:0] wait_cycles;
  logic        conv_busy, conv_done, shape_busy, shape_done;
  logic        conv_start, shape_start;
  logic [31:0] conv_ctrl, conv_waddr, conv_wlen, conv_raddr, conv_rlen;
  conv_cfg_t   conv_cfg;
  logic [31:0] shp_ctrl, shp_dsize, shp_c2, shp_s1, shp_s2, shp_z1, shp_z2;
  logic [31:0] shp_waddr, shp_wlen, shp_raddr, shp_rlen;

  instruction u_instr (
    .clk, .rst_n, .in_valid(instr_valid), .in_ready(instr_ready), .in_instr(instr_data),
    .conv_busy, .shape_busy, .reg_wr_en, .reg_wr_addr, .reg_wr_data,
    .idle(instr_idle), .wait_cycles
  );

  csr u_csr (
    .clk, .rst_n, .wr_en(reg_wr_en), .wr_addr(reg_wr_addr), .wr_data(reg_wr_data),
    .rd_addr(host_rd_addr), .rd_data(host_rd_data),
    .conv_busy, .conv_done, .shape_busy, .shape_done, .conv_start, .shape_start,
    .conv_ctrl, .conv_cfg, .conv_waddr, .conv_wlen, .conv_raddr, .conv_rlen,
    .shp_ctrl, .shp_dsize, .shp_c2, .shp_s1, .shp_s2, .shp_z1, .shp_z2,
    .shp_waddr, .shp_wlen, .shp_raddr, .shp_rlen
  );

  assign idle = instr_idle && !conv_busy && !shape_busy;

  // A module counts as busy until its last result has been written to
  // memory, not only until it has left the module: a layer that reads those
  // results may be started as soon as a WAIT sees the module idle.
  logic conv_core_busy, conv_core_done, shape_core_busy, shape_core_done;
  logic cd_wr_busy, sd_wr_busy;

  // ---------------- Conv module ----------------
  logic  c_in_valid, c_in_ready, c_in_feat, c_out_valid, c_out_ready;
  word_t c_in_data, c_out_data;
  logic  cd_rd_valid, cd_rd_ready, cd_rd_src, cd_rd_busy;
  word_t cd_rd_data;
  logic  cd_wr_valid, cd_wr_ready;

  conv_core #(.FB_DEPTH(FB_DEPTH), .WB_DEPTH(WB_DEPTH), .BUF_LAT(BUF_LAT),
              .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT), .LEAKY_RELU(LEAKY_RELU)) u_conv (
    .clk, .rst_n, .start(conv_start), .cfg(conv_cfg), .busy(conv_core_busy), .done(conv_core_done),
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_data(c_in_data), .in_feat(c_in_feat),
    .out_valid(c_out_valid), .out_ready(c_out_ready), .out_data(c_out_data)
  );

  // ---------------- Shape module ----------------
  logic  s_in_valid, s_in_ready, s_in_src, s_out_valid, s_out_ready;
  word_t s_in_data, s_out_data;
  logic  sd_rd_valid, sd_rd_ready, sd_rd_src, sd_rd_busy;
  word_t sd_rd_data;

  shape_core #(.MAX_COLS(MAX_COLS), .BURST_BYTES(BURST_BYTES)) u_shape (
    .clk, .rst_n, .start(shape_start), .ctrl(reg_wr_data), .dsize(shp_dsize), .c2(shp_c2),
    .s1(shp_s1), .s2(shp_s2), .z1(shp_z1), .z2(shp_z2), .out_words({3'd0, shp_wlen[31:3]}),
    .busy(shape_core_busy), .done(shape_core_done),
    .in_valid(s_in_valid), .in_ready(s_in_ready), .in_data(s_in_data), .in_src(s_in_src),
    .out_valid(s_out_valid), .out_ready(s_out_ready), .out_data(s_out_data)
  );

  // ---------------- stream routing (Conv -> Shape fusion) ----------------
  wire conv_to_shape  = conv_ctrl[1];
  wire shape_from_conv = shp_ctrl[4];

  // ---------------- stream routing between cores ----------------
  // Conv ControlReg[2]: the Conv output goes to the other cores (chain_out)
  // instead of memory.  ControlReg[3]: the feature part of the Conv input
  // comes from core ControlReg[7:4] (chain_in); quantization words and
  // weights still come from this core's read DMA.
  wire conv_to_chain   = conv_ctrl[2];
  wire feat_from_chain = conv_ctrl[3] && c_in_feat;

  assign chain_listen   = conv_ctrl[3] && conv_core_busy;
  assign chain_src      = conv_ctrl[7:4];
  assign chain_in_ready = feat_from_chain && c_in_ready;
  assign chain_out_valid = c_out_valid && conv_to_chain;
  assign chain_out_data  = c_out_data;

  assign c_in_valid  = feat_from_chain ? chain_in_valid : cd_rd_valid;
  assign c_in_data   = feat_from_chain ? chain_in_data : cd_rd_data;
  assign cd_rd_ready = !feat_from_chain && c_in_ready;

  assign cd_wr_valid = c_out_valid && !conv_to_shape && !conv_to_chain;
  assign c_out_ready = conv_to_chain ? chain_out_ready
                     : conv_to_shape ? (s_in_ready && shape_from_conv) : cd_wr_ready;

  assign s_in_valid  = shape_from_conv ? (c_out_valid && conv_to_shape) : sd_rd_valid;
  assign s_in_data   = shape_from_conv ? c_out_data : sd_rd_data;
  assign s_in_src    = shape_from_conv ? 1'b0 : sd_rd_src;
  assign sd_rd_ready = !shape_from_conv && s_in_ready;

  // ---------------- DMA engines and memory arbitration ----------------
  logic        m_ar_valid [2], m_ar_ready [2], m_r_valid [2], m_r_ready [2];
  logic [31:0] m_ar_addr [2], m_aw_addr [2];
  logic [7:0]  m_ar_len [2], m_aw_len [2];
  logic        m_aw_valid [2], m_aw_ready [2], m_w_valid [2], m_w_ready [2], m_w_last [2];
  word_t       m_w_data [2];
  word_t       m_r_data;
  logic        m_r_last;

  dma #(.BURST_BYTES(BURST_BYTES)) u_dma_conv (
    .clk, .rst_n,
    .rd_start(conv_start), .rd_addr(conv_raddr), .rd_len(conv_rlen), .rd_split(1'b0),
    .rd_busy(cd_rd_busy), .rd_valid(cd_rd_valid), .rd_ready(cd_rd_ready), .rd_data(cd_rd_data),
    .rd_src(cd_rd_src),
    .wr_start(conv_start && !reg_wr_data[1] && !reg_wr_data[2]), .wr_addr(conv_waddr), .wr_len(conv_wlen),
    .wr_busy(cd_wr_busy), .wr_valid(cd_wr_valid), .wr_ready(cd_wr_ready), .wr_data(c_out_data),
    .ar_valid(m_ar_valid[0]), .ar_ready(m_ar_ready[0]), .ar_addr(m_ar_addr[0]), .ar_len(m_ar_len[0]),
    .r_valid(m_r_valid[0]), .r_ready(m_r_ready[0]), .r_data(m_r_data), .r_last(m_r_last),
    .aw_valid(m_aw_valid[0]), .aw_ready(m_aw_ready[0]), .aw_addr(m_aw_addr[0]), .aw_len(m_aw_len[0]),
    .w_valid(m_w_valid[0]), .w_ready(m_w_ready[0]), .w_data(m_w_data[0]), .w_last(m_w_last[0])
  );

  dma #(.BURST_BYTES(BURST_BYTES)) u_dma_shape (
    .clk, .rst_n,
    .rd_start(shape_start && !reg_wr_data[4]), .rd_addr(shp_raddr), .rd_len(shp_rlen),
    .rd_split(reg_wr_data[3:1] == SHP_ADD),
    .rd_busy(sd_rd_busy), .rd_valid(sd_rd_valid), .rd_ready(sd_rd_ready), .rd_data(sd_rd_data),
    .rd_src(sd_rd_src),
    .wr_start(shape_start), .wr_addr(shp_waddr), .wr_len(shp_wlen),
    .wr_busy(sd_wr_busy), .wr_valid(s_out_valid), .wr_ready(s_out_ready), .wr_data(s_out_data),
    .ar_valid(m_ar_valid[1]), .ar_ready(m_ar_ready[1]), .ar_addr(m_ar_addr[1]), .ar_len(m_ar_len[1]),
    .r_valid(m_r_valid[1]), .r_ready(m_r_ready[1]), .r_data(m_r_data), .r_last(m_r_last),
    .aw_valid(m_aw_valid[1]), .aw_ready(m_aw_ready[1]), .aw_addr(m_aw_addr[1]), .aw_len(m_aw_len[1]),
    .w_valid(m_w_valid[1]), .w_ready(m_w_ready[1]), .w_data(m_w_data[1]), .w_last(m_w_last[1])
  );

  mem_arbiter u_arb (
    .clk, .rst_n,
    .m_ar_valid, .m_ar_ready, .m_ar_addr, .m_ar_len, .m_r_valid, .m_r_ready, .m_r_data, .m_r_last,
    .m_aw_valid, .m_aw_ready, .m_aw_addr, .m_aw_len, .m_w_valid, .m_w_ready, .m_w_data, .m_w_last,
    .ar_valid, .ar_ready, .ar_addr, .ar_len, .r_valid, .r_ready, .r_data, .r_last,
    .aw_valid, .aw_ready, .aw_addr, .aw_len, .w_valid, .w_ready, .w_data, .w_last
  );

  assign conv_busy  = conv_core_busy || cd_wr_busy;
  assign conv_done  = conv_core_done && !cd_wr_busy;
  assign shape_busy = shape_core_busy || sd_wr_busy;
  assign shape_done = shape_core_done && !sd_wr_busy;
endmodule
