// nna_pkg: types and constants shared by the accelerator.
//
// Data move through the design as 64-bit words that hold one pixel of eight
// channels (eight 8-bit lanes).  A feature map of C channels, H rows and W
// columns is stored channel-group major: word index = cg*H*W + h*W + w, with
// cg = c/8 and lane = c%8.  The 8-bit data width and the 8x8 compute
// parallelism follow the document; the memory layout, the register addresses
// and the instruction encoding are this design's own choices.
package nna_pkg;

  localparam int unsigned DATA_W  = 8;             // quantized data width
  localparam int unsigned LANES   = 8;             // channels per word
  localparam int unsigned WORD_W  = DATA_W * LANES; // 64-bit data word
  localparam int unsigned ACC_W   = 32;            // accumulator width
  localparam int unsigned ADDR_W  = 32;            // DDR byte address width

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [DATA_W-1:0] lane_t;

  // Register addresses of the instruction register set (word addresses).
  typedef enum logic [7:0] {
    R_CONV_STATE   = 8'h00,
    R_CONV_CTRL    = 8'h01,
    R_CONV_IMGSIZE = 8'h02,
    R_CONV_PARAM   = 8'h03,
    R_CONV_TYPE    = 8'h04,
    R_CONV_PCOUNT  = 8'h05,
    R_CONV_AMEND   = 8'h06,
    R_CONV_WADDR   = 8'h07,
    R_CONV_WLEN    = 8'h08,
    R_CONV_RADDR   = 8'h09,
    R_CONV_RLEN    = 8'h0A,
    R_SHP_STATE    = 8'h10,
    R_SHP_CTRL     = 8'h11,
    R_SHP_DSIZE    = 8'h12,
    R_SHP_C2       = 8'h13,
    R_SHP_S1       = 8'h14,
    R_SHP_S2       = 8'h15,
    R_SHP_Z1       = 8'h16,
    R_SHP_Z2       = 8'h17,
    R_SHP_WADDR    = 8'h18,
    R_SHP_WLEN     = 8'h19,
    R_SHP_RADDR    = 8'h1A,
    R_SHP_RLEN     = 8'h1B
  } reg_addr_e;

  // Host instruction: {opcode, register address, data}.
  typedef enum logic [7:0] {
    OP_NOP   = 8'h00,
    OP_WRITE = 8'h01,  // write data to the register at addr
    OP_WAIT  = 8'h02   // wait until the modules in data[1:0] are idle
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [7:0]  addr;
    logic [31:0] data;
  } instr_t;

  // Shape operators (Shape ControlReg[3:1]).
  typedef enum logic [2:0] {
    SHP_MAXPOOL  = 3'd0,
    SHP_UPSAMPLE = 3'd1,
    SHP_CONCAT   = 3'd2,
    SHP_SPLIT    = 3'd3,
    SHP_ADD      = 3'd4
  } shape_op_e;

  // Conv convolution types (Conv ConvTypeReg[15:0]).
  localparam logic [15:0] CONV_1X1 = 16'd1;
  localparam logic [15:0] CONV_3X3 = 16'd3;

  // Decoded Conv layer description (ImageSizeReg, ParamReg, ConvTypeReg).
  typedef struct packed {
    logic [9:0]  in_ch;
    logic [10:0] in_cols;
    logic [10:0] in_rows;
    logic        stride2;
    logic [7:0]  z3;
    logic [2:0]  n_z1;
    logic [7:0]  z1;
    logic        act_en;
    logic        pad_en;
    logic [9:0]  out_ch;
    logic [15:0] first_layer;
    logic [15:0] conv_type;
    logic [15:0] n_qparams;
    logic [15:0] n_weights;
    logic [31:0] amend;
  } conv_cfg_t;

  function automatic conv_cfg_t decode_conv_cfg(input logic [31:0] imgsize, input logic [31:0] param,
                                                input logic [31:0] ctype, input logic [31:0] pcount,
                                                input logic [31:0] amend);
    conv_cfg_t c;
    c.in_ch       = imgsize[31:22];
    c.in_cols     = imgsize[21:11];
    c.in_rows     = imgsize[10:0];
    c.stride2     = param[31];
    c.z3          = param[30:23];
    c.n_z1        = param[22:20];
    c.z1          = param[19:12];
    c.act_en      = param[11];
    c.pad_en      = param[10];
    c.out_ch      = param[9:0];
    c.first_layer = ctype[31:16];
    c.conv_type   = ctype[15:0];
    c.n_qparams   = pcount[31:16];
    c.n_weights   = pcount[15:0];
    c.amend       = amend;
    return c;
  endfunction

  // Saturate a signed value to the unsigned 8-bit range.
  function automatic lane_t sat_u8(input logic signed [47:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  // Scale a lane by a Q16.16 factor after removing its zero point:
  // (x - z) * s / 2^16, rounded to nearest (ties toward plus infinity).
  function automatic logic signed [47:0] scale_q16(input lane_t x, input lane_t z,
                                                   input logic [31:0] s);
    logic signed [47:0] p;
    p = 48'($signed({1'b0, x}) - $signed({1'b0, z})) * $signed({16'd0, s});
    return p;
  endfunction

  function automatic logic signed [47:0] round_q16(input logic signed [47:0] p);
    return (p + 48'sd32768) >>> 16;
  endfunction

endpackage
