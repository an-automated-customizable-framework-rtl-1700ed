// tb_yolo_csp: one cross-stage-partial block of YOLOv4-Tiny, scaled down.
//
// The block, as in the network's backbone but with 8x8 maps and a quarter
// of the channels, runs as an instruction program on one core:
//   x  = conv3x3(image)              8 -> 16 channels, padded
//   s  = split(x)                    upper 8 channels
//   c1 = conv3x3(s)                  8 -> 8
//   c2 = conv3x3(c1)                 8 -> 8
//   k  = concat(c2, c1)              16 channels
//   c3 = conv1x1(k)                  16 -> 16
//   r  = concat(x, c3)               32 channels
//   y  = maxpool(r)                  32 channels, 4x4
// Because a Conv layer reads its quantization words, weights and features
// as one memory region, each layer's weights are placed right before the
// tensor it reads; c1 is copied next to c2 (a split that keeps all channels)
// so that the first concatenation reads one region.  All convolutions share
// one output zero point and the concatenations use unit scales, so every
// intermediate tensor is checked exactly against the integer reference.
module tb_yolo_csp;
  import nna_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        instr_valid = 0, instr_ready;
  instr_t      instr_data = '0;
  logic [7:0]  host_rd_addr = '0;
  logic [31:0] host_rd_data;
  logic        idle;
  logic        ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [31:0] ar_addr, aw_addr;
  logic [7:0]  ar_len, aw_len;
  logic        aw_valid, aw_ready, w_valid, w_ready, w_last;
  word_t       r_data, w_data;
  logic        chain_out_valid, chain_in_ready, chain_listen;
  word_t       chain_out_data;
  logic [3:0]  chain_src;
  logic        chain_out_ready = 1'b0, chain_in_valid = 1'b0;
  word_t       chain_in_data = '0;

  nna_top dut (.*);

  ddr_model #(.WORDS(32768)) u_ddr (
    .clk, .rst_n, .ar_valid, .ar_ready, .ar_addr, .ar_len, .r_valid, .r_ready, .r_data, .r_last,
    .aw_valid, .aw_ready, .aw_addr, .aw_len, .w_valid, .w_ready, .w_data, .w_last
  );

  localparam int H = 8, W = 8, ZQ = 10;
  int checks = 0, failures = 0;
  int n_conv = 0, n_op [5] = '{default: 0};
  always_ff @(posedge clk) begin
    if (dut.conv_start) n_conv++;
    if (dut.shape_start) n_op[dut.reg_wr_data[3:1]]++;
  end

  // tensors of the block, [channel][row][col]
  int tx [16][H][W], t1 [8][H][W], t2 [8][H][W], t3 [16][H][W], ty [32][H/2][W/2];

  task automatic send(opcode_e op, logic [7:0] addr, logic [31:0] data);
    instr_valid <= 1; instr_data <= '{op: op, addr: addr, data: data};
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 0;
  endtask
  task automatic wr(reg_addr_e a, logic [31:0] d); send(OP_WRITE, a, d); endtask

  // Random parameters of a layer, written to memory so that they end right
  // before word address `feat`; returns the first word address.
  function automatic int put_params(int cin, int oc, int k, int feat);
    int n, cg, og, base;
    cg = (cin + 7) / 8; og = (oc + 7) / 8;
    for (int o = 0; o < og*8; o++) begin
      bias[o] = $urandom_range(0, 2000) - 1000; mult[o] = $urandom_range(1, 60); shft[o] = $urandom_range(12, 15);
      for (int c = 0; c < cg*8; c++) for (int y = 0; y < 3; y++) for (int x = 0; x < 3; x++)
        wt[o][c][y][x] = byte'($urandom_range(0, 255));
    end
    base = feat - og*8 - og*k*k*cg*8;
    n = base;
    for (int o = 0; o < og*8; o++) u_ddr.mem[n++] = qparam_word(o);
    for (int g = 0; g < og; g++) for (int y = 0; y < k; y++) for (int x = 0; x < k; x++)
      for (int i = 0; i < cg; i++) for (int l = 0; l < 8; l++) u_ddr.mem[n++] = weight_word(g, y, x, i, l);
    return base;
  endfunction

  task automatic conv(int cin, int oc, int k, int z1, int amend, int base, int feat, int out);
    int og, cg, padv;
    og = (oc + 7) / 8; cg = (cin + 7) / 8; padv = (k == 3) ? 1 : 0;
    wr(R_CONV_IMGSIZE, {10'(cin), 11'(W), 11'(H)});
    wr(R_CONV_PARAM, {1'b0, 8'(ZQ), 3'd1, 8'(z1), 1'b1, padv[0], 10'(oc)});
    wr(R_CONV_TYPE, {16'd0, (k == 3) ? CONV_3X3 : CONV_1X1});
    wr(R_CONV_PCOUNT, {16'(og*8), 16'(og*k*k*cg*8)});
    wr(R_CONV_AMEND, 32'(amend));
    wr(R_CONV_RADDR, 32'(base * 8));
    wr(R_CONV_RLEN, 32'((feat - base + cg*H*W) * 8));
    wr(R_CONV_WADDR, 32'(out * 8));
    wr(R_CONV_WLEN, 32'(og*H*W*8));
    wr(R_CONV_CTRL, 32'd1);
    send(OP_WAIT, 0, 32'd1);
  endtask

  task automatic shape(shape_op_e op, int c1, int h, int w, int c2, int rd, int rd_words, int out, int out_words);
    wr(R_SHP_DSIZE, {10'(c1), 11'(w), 11'(h)});
    wr(R_SHP_C2, 32'(c2));
    wr(R_SHP_S1, 32'h0001_0000); wr(R_SHP_S2, 32'h0001_0000);
    wr(R_SHP_Z1, 32'(ZQ)); wr(R_SHP_Z2, 32'(ZQ));
    wr(R_SHP_RADDR, 32'(rd * 8)); wr(R_SHP_RLEN, 32'(rd_words * 8));
    wr(R_SHP_WADDR, 32'(out * 8)); wr(R_SHP_WLEN, 32'(out_words * 8));
    wr(R_SHP_CTRL, {16'd0, 8'(ZQ), 3'd0, 1'b0, op, 1'b1});
    send(OP_WAIT, 0, 32'd2);
  endtask

  // word addresses
  localparam int IMG = 'h0400, XO = 'h1000, SO = 'h2000, C1O = 'h3000, C2O = 'h4000, KO = 'h5000,
                 RO = 'h6000, YO = 'h7000;

  function automatic longint unsigned word_of(int v [8]);
    longint unsigned r = 0;
    for (int l = 0; l < 8; l++) r |= longint'(v[l] & 255) << (8*l);
    return r;
  endfunction

  task automatic check_region(string name, int base, int nch, int h, int w, int sel);
    int v [8];
    for (int g = 0; g < nch/8; g++) for (int r = 0; r < h; r++) for (int q = 0; q < w; q++) begin
      for (int l = 0; l < 8; l++) begin
        int c = g*8 + l;
        case (sel)
          0: v[l] = tx[c][r][q];
          1: v[l] = tx[8 + c][r][q];
          2: v[l] = t1[c][r][q];
          3: v[l] = (c < 8) ? t2[c][r][q] : t1[c-8][r][q];
          4: v[l] = (c < 16) ? tx[c][r][q] : t3[c-16][r][q];
          default: v[l] = ty[c][r][q];
        endcase
      end
      checks++;
      if (u_ddr.mem[base + (g*h + r)*w + q] != word_of(v)) begin
        failures++;
        if (failures < 10) $display("%s word %0d/%0d/%0d: got %h exp %h", name, g, r, q,
                                    u_ddr.mem[base + (g*h + r)*w + q], word_of(v));
      end
    end
  endtask

  initial begin
    int b, z1, t0, am;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    t0 = $time / 10;

    // x = conv3x3(image): 8 -> 16
    z1 = $urandom_range(0, 30); am = $urandom_range(0, 60) - 30;
    for (int c = 0; c < 8; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++) begin
      fm[c][r][q] = byte'($urandom_range(0, 255));
      u_ddr.mem[IMG + r*W + q][c*8 +: 8] = fm[c][r][q];
    end
    b = put_params(8, 16, 3, IMG);
    for (int o = 0; o < 16; o++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      tx[o][r][q] = conv_out(o, r, q, 8, H, W, 3, 1, 1, z1, am, ZQ, 1);
    conv(8, 16, 3, z1, am, b, IMG, XO);

    // s = split(x): channels 8..15
    shape(SHP_SPLIT, 16, H, W, 8, XO, 128, SO, 64);

    // c1 = conv3x3(s)
    for (int c = 0; c < 8; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++) fm[c][r][q] = byte'(tx[8 + c][r][q]);
    am = $urandom_range(0, 60) - 30;
    b = put_params(8, 8, 3, SO);
    for (int o = 0; o < 8; o++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      t1[o][r][q] = conv_out(o, r, q, 8, H, W, 3, 1, 1, ZQ, am, ZQ, 1);
    conv(8, 8, 3, ZQ, am, b, SO, C1O);

    // c2 = conv3x3(c1), then c1 copied after it
    for (int c = 0; c < 8; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++) fm[c][r][q] = byte'(t1[c][r][q]);
    am = $urandom_range(0, 60) - 30;
    b = put_params(8, 8, 3, C1O);
    for (int o = 0; o < 8; o++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      t2[o][r][q] = conv_out(o, r, q, 8, H, W, 3, 1, 1, ZQ, am, ZQ, 1);
    conv(8, 8, 3, ZQ, am, b, C1O, C2O);
    shape(SHP_SPLIT, 8, H, W, 0, C1O, 64, C2O + 64, 64);

    // k = concat(c2, c1); c3 = conv1x1(k): 16 -> 16
    shape(SHP_CONCAT, 8, H, W, 8, C2O, 128, KO, 128);
    for (int c = 0; c < 16; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      fm[c][r][q] = byte'((c < 8) ? t2[c][r][q] : t1[c-8][r][q]);
    am = $urandom_range(0, 60) - 30;
    b = put_params(16, 16, 1, KO);
    for (int o = 0; o < 16; o++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      t3[o][r][q] = conv_out(o, r, q, 16, H, W, 1, 0, 1, ZQ, am, ZQ, 1);
    conv(16, 16, 1, ZQ, am, b, KO, XO + 128);

    // r = concat(x, c3); y = maxpool(r)
    shape(SHP_CONCAT, 16, H, W, 16, XO, 256, RO, 256);
    shape(SHP_MAXPOOL, 32, H, W, 0, RO, 256, YO, 64);
    for (int c = 0; c < 32; c++) for (int r = 0; r < H/2; r++) for (int q = 0; q < W/2; q++) begin
      int m;
      m = 0;
      for (int dy = 0; dy < 2; dy++) for (int dx = 0; dx < 2; dx++) begin
        int v;
        v = (c < 16) ? tx[c][2*r+dy][2*q+dx] : t3[c-16][2*r+dy][2*q+dx];
        if (v > m) m = v;
      end
      ty[c][r][q] = m;
    end
    while (!idle) @(posedge clk);
    $display("CSP block finished in %0d cycles", $time / 10 - t0);

    check_region("x", XO, 16, H, W, 0);
    check_region("s", SO, 8, H, W, 1);
    check_region("c1", C1O, 8, H, W, 2);
    check_region("concat(c2,c1)", KO, 16, H, W, 3);
    check_region("concat(x,c3)", RO, 32, H, W, 4);
    check_region("maxpool", YO, 32, H/2, W/2, 5);
    $display("layers: conv=%0d split=%0d concat=%0d maxpool=%0d", n_conv, n_op[3], n_op[2], n_op[0]);
    checks++; if (n_conv != 4 || n_op[3] != 2 || n_op[2] != 2 || n_op[0] != 1) begin failures++; $display("wrong layer count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
