// tb_csr: checks the register set.
//
// Writes random values to every register and reads them back, checks the
// decoded Conv fields against the documented bit positions, the StateReg
// status bits, the start pulses (only for a ControlReg write with bit 0 set)
// and that an unknown address reads zero.
module tb_csr;
  import nna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic conv_busy = 0, conv_done = 0, shape_busy = 0, shape_done = 0;
  logic conv_start, shape_start;
  logic [31:0] conv_ctrl, conv_waddr, conv_wlen, conv_raddr, conv_rlen;
  conv_cfg_t conv_cfg;
  logic [31:0] shp_ctrl, shp_dsize, shp_c2, shp_s1, shp_s2, shp_z1, shp_z2, shp_waddr, shp_wlen, shp_raddr, shp_rlen;
  csr dut (.*);

  int checks = 0, failures = 0;
  int n_cs = 0, n_ss = 0;
  always @(posedge clk) begin
    if (conv_start) n_cs++;
    if (shape_start) n_ss++;
  end

  logic [7:0] addrs [21] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08, 8'h09, 8'h0A,
                             8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16, 8'h17, 8'h18, 8'h19, 8'h1A, 8'h1B};
  logic [31:0] vals [21];

  task automatic w(logic [7:0] a, logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (addrs[i]) begin
      vals[i] = $urandom;
      if (addrs[i] == 8'h01 || addrs[i] == 8'h11) vals[i][0] = 1'b0;
      w(addrs[i], vals[i]);
    end
    foreach (addrs[i]) begin
      rd_addr = addrs[i]; #1;
      checks++; if (rd_data != vals[i]) begin failures++; $display("reg %h read %h exp %h", addrs[i], rd_data, vals[i]); end
    end
    // decoded Conv fields: ImageSizeReg = vals[1], ParamReg = vals[2], ConvTypeReg = vals[3], ParamCountReg = vals[4]
    checks++; if (conv_cfg.in_ch != vals[1][31:22] || conv_cfg.in_cols != vals[1][21:11] || conv_cfg.in_rows != vals[1][10:0]) failures++;
    checks++; if (conv_cfg.stride2 != vals[2][31] || conv_cfg.z3 != vals[2][30:23] || conv_cfg.n_z1 != vals[2][22:20] ||
                  conv_cfg.z1 != vals[2][19:12] || conv_cfg.act_en != vals[2][11] || conv_cfg.pad_en != vals[2][10] ||
                  conv_cfg.out_ch != vals[2][9:0]) failures++;
    checks++; if (conv_cfg.first_layer != vals[3][31:16] || conv_cfg.conv_type != vals[3][15:0]) failures++;
    checks++; if (conv_cfg.n_qparams != vals[4][31:16] || conv_cfg.n_weights != vals[4][15:0]) failures++;
    checks++; if (conv_cfg.amend != vals[5] || shp_rlen != vals[20] || conv_rlen != vals[9]) failures++;
    checks++; if (n_cs != 0 || n_ss != 0) begin failures++; $display("spurious start"); end
    w(8'h01, 32'h3); w(8'h11, 32'h9); w(8'h01, 32'h2);
    checks++; if (n_cs != 1 || n_ss != 1) begin failures++; $display("start pulses %0d %0d", n_cs, n_ss); end
    conv_busy = 1; shape_done = 1;
    rd_addr = 8'h00; #1; checks++; if (rd_data != 32'h1) failures++;
    rd_addr = 8'h10; #1; checks++; if (rd_data != 32'h2) failures++;
    rd_addr = 8'h3F; #1; checks++; if (rd_data != 32'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
