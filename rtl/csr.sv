// csr: the Control and Status Registers (instruction register set).
//
// Holds the 32-bit registers of the Conv and Shape modules: control, network
// parameters and DMA addresses/lengths.  Writes come from the instruction
// unit (wr_en, wr_addr, wr_data) and take effect at the next clock edge.
// Writing a ControlReg with bit 0 set also raises the matching start pulse
// in the same cycle.  Reads are combinational; the two StateRegs read the
// modules' live status ({30'b0, done, busy}).  Register names and field
// layouts follow the document's register table; the addresses (reg_addr_e)
// are this design's, since the document gives none.  Unknown addresses
// read as zero and ignore writes.
module csr
  import nna_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [7:0]  wr_addr,
  input  logic [31:0] wr_data,
  input  logic [7:0]  rd_addr,
  output logic [31:0] rd_data,
  // status in
  input  logic        conv_busy,
  input  logic        conv_done,
  input  logic        shape_busy,
  input  logic        shape_done,
  // start pulses
  output logic        conv_start,
  output logic        shape_start,
  // Conv registers
  output logic [31:0] conv_ctrl,
  output conv_cfg_t   conv_cfg,
  output logic [31:0] conv_waddr,
  output logic [31:0] conv_wlen,
  output logic [31:0] conv_raddr,
  output logic [31:0] conv_rlen,
  // Shape registers
  output logic [31:0] shp_ctrl,
  output logic [31:0] shp_dsize,
  output logic [31:0] shp_c2,
  output logic [31:0] shp_s1,
  output logic [31:0] shp_s2,
  output logic [31:0] shp_z1,
  output logic [31:0] shp_z2,
  output logic [31:0] shp_waddr,
  output logic [31:0] shp_wlen,
  output logic [31:0] shp_raddr,
  output logic [31:0] shp_rlen
);
  logic [31:0] imgsize, param, ctype, pcount, amend;

  assign conv_cfg    = decode_conv_cfg(imgsize, param, ctype, pcount, amend);
  assign conv_start  = wr_en && (wr_addr == R_CONV_CTRL) && wr_data[0];
  assign shape_start = wr_en && (wr_addr == R_SHP_CTRL) && wr_data[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conv_ctrl <= '0; imgsize <= '0; param <= '0; ctype <= '0; pcount <= '0; amend <= '0;
      conv_waddr <= '0; conv_wlen <= '0; conv_raddr <= '0; conv_rlen <= '0;
      shp_ctrl <= '0; shp_dsize <= '0; shp_c2 <= '0; shp_s1 <= '0; shp_s2 <= '0;
      shp_z1 <= '0; shp_z2 <= '0; shp_waddr <= '0; shp_wlen <= '0; shp_raddr <= '0; shp_rlen <= '0;
    end else if (wr_en) begin
      case (wr_addr)
        R_CONV_CTRL:    conv_ctrl  <= wr_data;
        R_CONV_IMGSIZE: imgsize    <= wr_data;
        R_CONV_PARAM:   param      <= wr_data;
        R_CONV_TYPE:    ctype      <= wr_data;
        R_CONV_PCOUNT:  pcount     <= wr_data;
        R_CONV_AMEND:   amend      <= wr_data;
        R_CONV_WADDR:   conv_waddr <= wr_data;
        R_CONV_WLEN:    conv_wlen  <= wr_data;
        R_CONV_RADDR:   conv_raddr <= wr_data;
        R_CONV_RLEN:    conv_rlen  <= wr_data;
        R_SHP_CTRL:     shp_ctrl   <= wr_data;
        R_SHP_DSIZE:    shp_dsize  <= wr_data;
        R_SHP_C2:       shp_c2     <= wr_data;
        R_SHP_S1:       shp_s1     <= wr_data;
        R_SHP_S2:       shp_s2     <= wr_data;
        R_SHP_Z1:       shp_z1     <= wr_data;
        R_SHP_Z2:       shp_z2     <= wr_data;
        R_SHP_WADDR:    shp_waddr  <= wr_data;
        R_SHP_WLEN:     shp_wlen   <= wr_data;
        R_SHP_RADDR:    shp_raddr  <= wr_data;
        R_SHP_RLEN:     shp_rlen   <= wr_data;
        default: ;
      endcase
    end
  end

  always_comb begin
    case (rd_addr)
      R_CONV_STATE:   rd_data = {30'd0, conv_done, conv_busy};
      R_CONV_CTRL:    rd_data = conv_ctrl;
      R_CONV_IMGSIZE: rd_data = imgsize;
      R_CONV_PARAM:   rd_data = param;
      R_CONV_TYPE:    rd_data = ctype;
      R_CONV_PCOUNT:  rd_data = pcount;
      R_CONV_AMEND:   rd_data = amend;
      R_CONV_WADDR:   rd_data = conv_waddr;
      R_CONV_WLEN:    rd_data = conv_wlen;
      R_CONV_RADDR:   rd_data = conv_raddr;
      R_CONV_RLEN:    rd_data = conv_rlen;
      R_SHP_STATE:    rd_data = {30'd0, shape_done, shape_busy};
      R_SHP_CTRL:     rd_data = shp_ctrl;
      R_SHP_DSIZE:    rd_data = shp_dsize;
      R_SHP_C2:       rd_data = shp_c2;
      R_SHP_S1:       rd_data = shp_s1;
      R_SHP_S2:       rd_data = shp_s2;
      R_SHP_Z1:       rd_data = shp_z1;
      R_SHP_Z2:       rd_data = shp_z2;
      R_SHP_WADDR:    rd_data = shp_waddr;
      R_SHP_WLEN:     rd_data = shp_wlen;
      R_SHP_RADDR:    rd_data = shp_raddr;
      R_SHP_RLEN:     rd_data = shp_rlen;
      default:        rd_data = '0;
    endcase
  end
endmodule
