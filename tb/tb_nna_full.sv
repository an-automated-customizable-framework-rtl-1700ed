// tb_nna_full: end-to-end test of the complete design at its default
// parameters (the multi-core wrapper with its default single core).
//
// Same program and checks as the single-core end-to-end test: a host model
// loads layer data into a behavioural external memory and sends an
// instruction program that runs
//   A  3x3 convolution with padding (16 -> 16 channels, 8x8)
//   B  3x3 convolution with stride 2, at the same time as
//   P  max pooling of A's output (Conv and Shape share the memory port)
//   U  upsampling of P, written right after A's output
//   C  concatenation of A and U (two scales and zero points)
//   S  split of C (upper 16 channels)
//   D  addition of A and U
//   F  1x1 convolution whose output goes straight into max pooling
//   G  1x1 convolution into a slow memory, so the Conv issue has to wait
// Every result is compared word by word with integer reference models, and
// each mechanism (padding, stride, credit stall, memory stalls, arbitration,
// add alternation, Conv->Shape forwarding, WAIT, every Shape operator) must
// have happened at least once.
module tb_nna_full;
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

  // The whole accelerator at its default configuration (one core); its
  // ports are arrays with one entry per core.
  logic        a_instr_valid [1], a_instr_ready [1], a_idle [1];
  instr_t      a_instr_data [1];
  logic [7:0]  a_host_rd_addr [1];
  logic [31:0] a_host_rd_data [1];
  logic        a_ar_valid [1], a_ar_ready [1], a_r_valid [1], a_r_ready [1], a_r_last [1];
  logic [31:0] a_ar_addr [1], a_aw_addr [1];
  logic [7:0]  a_ar_len [1], a_aw_len [1];
  logic        a_aw_valid [1], a_aw_ready [1], a_w_valid [1], a_w_ready [1], a_w_last [1];
  word_t       a_r_data [1], a_w_data [1];

  nna_multicore top (
    .clk, .rst_n, .instr_valid(a_instr_valid), .instr_ready(a_instr_ready), .instr_data(a_instr_data),
    .host_rd_addr(a_host_rd_addr), .host_rd_data(a_host_rd_data), .idle(a_idle),
    .ar_valid(a_ar_valid), .ar_ready(a_ar_ready), .ar_addr(a_ar_addr), .ar_len(a_ar_len),
    .r_valid(a_r_valid), .r_ready(a_r_ready), .r_data(a_r_data), .r_last(a_r_last),
    .aw_valid(a_aw_valid), .aw_ready(a_aw_ready), .aw_addr(a_aw_addr), .aw_len(a_aw_len),
    .w_valid(a_w_valid), .w_ready(a_w_ready), .w_data(a_w_data), .w_last(a_w_last)
  );
  assign a_instr_valid[0] = instr_valid; assign instr_ready = a_instr_ready[0];
  assign a_instr_data[0] = instr_data; assign a_host_rd_addr[0] = host_rd_addr;
  assign host_rd_data = a_host_rd_data[0]; assign idle = a_idle[0];
  assign ar_valid = a_ar_valid[0]; assign a_ar_ready[0] = ar_ready; assign ar_addr = a_ar_addr[0];
  assign ar_len = a_ar_len[0]; assign a_r_valid[0] = r_valid; assign r_ready = a_r_ready[0];
  assign a_r_data[0] = r_data; assign a_r_last[0] = r_last;
  assign aw_valid = a_aw_valid[0]; assign a_aw_ready[0] = aw_ready; assign aw_addr = a_aw_addr[0];
  assign aw_len = a_aw_len[0]; assign w_valid = a_w_valid[0]; assign a_w_ready[0] = w_ready;
  assign w_data = a_w_data[0]; assign w_last = a_w_last[0];

  ddr_model #(.WORDS(32768)) u_ddr (
    .clk, .rst_n, .ar_valid, .ar_ready, .ar_addr, .ar_len, .r_valid, .r_ready, .r_data, .r_last,
    .aw_valid, .aw_ready, .aw_addr, .aw_len, .w_valid, .w_ready, .w_data, .w_last
  );

  int checks = 0, failures = 0;
  longint unsigned expw [int];     // expected memory words, by word address

  // ---------------- mechanism counters ----------------
  int n_pad = 0, n_stride = 0, n_credit = 0, n_contend = 0, n_alt = 0, n_fwd = 0, n_wait = 0;
  int n_op [5] = '{default: 0};
  logic prev_src = 0;
  always_ff @(posedge clk) begin
    if (top.g_core[0].u_core.u_conv.issue && top.g_core[0].u_core.u_conv.pad) n_pad++;
    if (top.g_core[0].u_core.conv_start && top.g_core[0].u_core.u_csr.param[31]) n_stride++;
    if (top.g_core[0].u_core.u_conv.st == 2'd2 && !top.g_core[0].u_core.u_conv.issue) n_credit++;
    if (top.g_core[0].u_core.m_ar_valid[0] && top.g_core[0].u_core.m_ar_valid[1]) n_contend++;
    if (top.g_core[0].u_core.sd_rd_valid && top.g_core[0].u_core.sd_rd_ready) begin
      if (top.g_core[0].u_core.sd_rd_src != prev_src) n_alt++;
      prev_src <= top.g_core[0].u_core.sd_rd_src;
    end
    if (top.g_core[0].u_core.c_out_valid && top.g_core[0].u_core.c_out_ready && top.g_core[0].u_core.conv_to_shape) n_fwd++;
    if (top.g_core[0].u_core.shape_start) n_op[top.g_core[0].u_core.reg_wr_data[3:1]]++;
  end

  // ---------------- host ----------------
  task automatic send(opcode_e op, logic [7:0] addr, logic [31:0] data);
    instr_valid <= 1; instr_data <= '{op: op, addr: addr, data: data};
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 0;
  endtask

  task automatic wr(reg_addr_e a, logic [31:0] d); send(OP_WRITE, a, d); endtask

  function automatic longint unsigned lanes(longint unsigned v, int l); return (v >> (8*l)) & 8'hff; endfunction

  // Build a conv layer in memory and its expected output; returns the read length in bytes.
  task automatic conv_layer(int in_w, int out_w, int cin, int h, int w, int oc, int k, bit pad,
                            bit str2, bit to_shape, bit fused_exp);
    int padv, str, oh, ow, cg, og, z1, z3, amend, n, nq, nw;
    str = str2 ? 2 : 1; padv = (pad && k == 3) ? 1 : 0;
    oh = (h + 2*padv - k) / str + 1; ow = (w + 2*padv - k) / str + 1;
    cg = (cin + 7) / 8; og = (oc + 7) / 8;
    z1 = $urandom_range(0, 30); z3 = $urandom_range(0, 20); amend = $urandom_range(0, 100) - 50;
    for (int c = 0; c < cg*8; c++) for (int r = 0; r < h; r++) for (int q = 0; q < w; q++)
      fm[c][r][q] = (c < cin) ? byte'($urandom_range(0, 255)) : byte'(z1);
    for (int o = 0; o < og*8; o++) begin
      bias[o] = $urandom_range(0, 2000) - 1000; mult[o] = $urandom_range(1, 200); shft[o] = $urandom_range(10, 14);
      for (int c = 0; c < cg*8; c++) for (int y = 0; y < 3; y++) for (int x = 0; x < 3; x++)
        wt[o][c][y][x] = (c < cin) ? byte'($urandom_range(0, 255)) : 8'sd0;
    end
    n = in_w;
    for (int o = 0; o < og*8; o++) u_ddr.mem[n++] = qparam_word(o);
    for (int g = 0; g < og; g++) for (int y = 0; y < k; y++) for (int x = 0; x < k; x++)
      for (int i = 0; i < cg; i++) for (int l = 0; l < 8; l++) u_ddr.mem[n++] = weight_word(g, y, x, i, l);
    for (int i = 0; i < cg; i++) for (int r = 0; r < h; r++) for (int q = 0; q < w; q++)
      u_ddr.mem[n++] = feature_word(i, r, q);
    nq = og*8; nw = og*k*k*cg*8;
    // expected output (or, when forwarded, the stream into the Shape module)
    for (int g = 0; g < og; g++) for (int r = 0; r < oh; r++) for (int q = 0; q < ow; q++) begin
      logic [63:0] v;
      for (int l = 0; l < 8; l++) v[l*8 +: 8] = 8'(conv_out(g*8 + l, r, q, cg*8, h, w, k, padv, str, z1, amend, z3, 1));
      if (fused_exp) fwd_buf.push_back(v);
      else expw[out_w + (g*oh + r)*ow + q] = v;
    end
    wr(R_CONV_IMGSIZE, {10'(cin), 11'(w), 11'(h)});
    wr(R_CONV_PARAM, {str2, 8'(z3), 3'd1, 8'(z1), 1'b1, pad, 10'(oc)});
    wr(R_CONV_TYPE, {16'd0, (k == 3) ? CONV_3X3 : CONV_1X1});
    wr(R_CONV_PCOUNT, {16'(nq), 16'(nw)});
    wr(R_CONV_AMEND, 32'(amend));
    wr(R_CONV_RADDR, 32'(in_w * 8));
    wr(R_CONV_RLEN, 32'((n - in_w) * 8));
    wr(R_CONV_WADDR, 32'(out_w * 8));
    wr(R_CONV_WLEN, 32'(og*oh*ow*8));
    wr(R_CONV_CTRL, {30'd0, to_shape, 1'b1});
  endtask

  longint unsigned fwd_buf [$];

  function automatic longint unsigned ew(int a);
    if (!expw.exists(a)) begin $display("missing expected word %0d", a); return 0; end
    return expw[a];
  endfunction

  function automatic longint unsigned vmax(longint unsigned a, longint unsigned b);
    longint unsigned m = 0;
    for (int l = 0; l < 8; l++) m |= ((lanes(a, l) > lanes(b, l)) ? lanes(a, l) : lanes(b, l)) << (8*l);
    return m;
  endfunction

  task automatic shape_regs(shape_op_e op, bit from_conv, int zo, int c1, int h, int w, int c2,
                            int s1, int s2, int z1, int z2, int rd_w, int rd_words, int wr_w, int wr_words);
    wr(R_SHP_DSIZE, {10'(c1), 11'(w), 11'(h)});
    wr(R_SHP_C2, 32'(c2));
    wr(R_SHP_S1, 32'(s1)); wr(R_SHP_S2, 32'(s2));
    wr(R_SHP_Z1, 32'(z1)); wr(R_SHP_Z2, 32'(z2));
    wr(R_SHP_RADDR, 32'(rd_w * 8)); wr(R_SHP_RLEN, 32'(rd_words * 8));
    wr(R_SHP_WADDR, 32'(wr_w * 8)); wr(R_SHP_WLEN, 32'(wr_words * 8));
    wr(R_SHP_CTRL, {16'd0, 8'(zo), 3'd0, from_conv, op, 1'b1});
  endtask

  localparam int IN_A = 'h0000, OUT1 = 'h1000, OUT3 = 'h1080, IN_B = 'h2000, OUT_B = 'h2800;
  localparam int OUT2 = 'h3000, OUT4 = 'h3400, OUT5 = 'h3800, OUT6 = 'h3C00, IN_C = 'h4000, OUT7 = 'h4800;
  localparam int IN_G = 'h4C00, OUT8 = 'h5000;

  initial begin
    int s1, s2, z1, z2, zo, t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    t0 = $time / 10;

    // A: 3x3, pad, 16 -> 16 channels, 8x8
    conv_layer(IN_A, OUT1, 16, 8, 8, 16, 3, 1, 0, 0, 0);
    send(OP_WAIT, 0, 32'd1);
    // B (3x3 stride 2) and P (max pooling of A) at the same time
    conv_layer(IN_B, OUT_B, 8, 9, 9, 8, 3, 0, 1, 0, 0);
    for (int g = 0; g < 2; g++) for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      expw[OUT2 + (g*4 + r)*4 + c] = vmax(vmax(ew(OUT1 + (g*8 + 2*r)*8 + 2*c), ew(OUT1 + (g*8 + 2*r)*8 + 2*c + 1)),
                                          vmax(ew(OUT1 + (g*8 + 2*r + 1)*8 + 2*c), ew(OUT1 + (g*8 + 2*r + 1)*8 + 2*c + 1)));
    shape_regs(SHP_MAXPOOL, 0, 0, 16, 8, 8, 0, 0, 0, 0, 0, OUT1, 128, OUT2, 32);
    send(OP_WAIT, 0, 32'd3);
    // U: upsample P back to 8x8, next to A's output
    for (int g = 0; g < 2; g++) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
      expw[OUT3 + (g*8 + r)*8 + c] = ew(OUT2 + (g*4 + r/2)*4 + c/2);
    shape_regs(SHP_UPSAMPLE, 0, 0, 16, 4, 4, 0, 0, 0, 0, 0, OUT2, 32, OUT3, 128);
    send(OP_WAIT, 0, 32'd2);
    // C: concat A (16 ch) and U (16 ch)
    s1 = 'h0000_C000; s2 = 'h0001_4000; z1 = 12; z2 = 7; zo = 5;
    for (int i = 0; i < 256; i++) begin
      longint unsigned x, v;
      x = ew(OUT1 + i); v = 0;
      for (int l = 0; l < 8; l++)
        v |= longint'(ref_round_q16(i < 128 ? rescale(lanes(x, l), z1, s1) : rescale(lanes(x, l), z2, s2), zo)) << (8*l);
      expw[OUT4 + i] = v;
    end
    shape_regs(SHP_CONCAT, 0, zo, 16, 8, 8, 16, s1, s2, z1, z2, OUT1, 256, OUT4, 256);
    send(OP_WAIT, 0, 32'd2);
    // S: split C, keep channels 16..31
    for (int i = 0; i < 128; i++) expw[OUT5 + i] = ew(OUT4 + 128 + i);
    shape_regs(SHP_SPLIT, 0, 0, 32, 8, 8, 16, 0, 0, 0, 0, OUT4, 256, OUT5, 128);
    send(OP_WAIT, 0, 32'd2);
    // D: add A and U
    s1 = 'h0000_8000; s2 = 'h0000_A000; z1 = 3; z2 = 9; zo = 11;
    for (int i = 0; i < 128; i++) begin
      longint unsigned a, b, v;
      a = ew(OUT1 + i); b = ew(OUT3 + i); v = 0;
      for (int l = 0; l < 8; l++)
        v |= longint'(ref_round_q16(rescale(lanes(a, l), z1, s1) + rescale(lanes(b, l), z2, s2), zo)) << (8*l);
      expw[OUT6 + i] = v;
    end
    shape_regs(SHP_ADD, 0, zo, 16, 8, 8, 16, s1, s2, z1, z2, OUT1, 256, OUT6, 128);
    send(OP_WAIT, 0, 32'd2);
    // F: 1x1 conv (8 -> 8, 8x8) forwarded into max pooling
    fwd_buf.delete();
    shape_regs(SHP_MAXPOOL, 1, 0, 8, 8, 8, 0, 0, 0, 0, 0, 0, 0, OUT7, 16);
    conv_layer(IN_C, 0, 8, 8, 8, 8, 1, 0, 0, 1, 1);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      expw[OUT7 + r*4 + c] = vmax(vmax(fwd_buf[2*r*8 + 2*c], fwd_buf[2*r*8 + 2*c + 1]),
                                  vmax(fwd_buf[(2*r+1)*8 + 2*c], fwd_buf[(2*r+1)*8 + 2*c + 1]));
    send(OP_WAIT, 0, 32'd3);
    // G: 1x1 conv, one beat per pixel, into a slow memory: the Conv issue stalls
    u_ddr.stall_pct = 75;
    conv_layer(IN_G, OUT8, 8, 16, 16, 8, 1, 0, 0, 0, 0);
    send(OP_WAIT, 0, 32'd1);
    while (!idle) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("program finished in %0d cycles", $time / 10 - t0);

    // results
    foreach (expw[a]) begin
      checks++;
      if (u_ddr.mem[a] != expw[a]) begin
        failures++;
        if (failures < 10) $display("MISMATCH word %h: got %h exp %h", a, u_ddr.mem[a], expw[a]);
      end
    end
    host_rd_addr <= R_CONV_STATE; @(posedge clk); #1;
    checks++; if (host_rd_data != 32'd2) begin failures++; $display("Conv StateReg %h", host_rd_data); end
    host_rd_addr <= R_SHP_STATE; @(posedge clk); #1;
    checks++; if (host_rd_data != 32'd2) begin failures++; $display("Shape StateReg %h", host_rd_data); end
    checks++; if (u_ddr.wlast_errors != 0) begin failures++; $display("w_last errors"); end

    $display("mechanisms: pad=%0d stride=%0d credit_stall=%0d ddr_rd_stall=%0d ddr_wr_stall=%0d contention=%0d add_alternations=%0d forwarded=%0d wait_cycles=%0d",
             n_pad, n_stride, n_credit, u_ddr.rd_stalls, u_ddr.wr_stalls, n_contend, n_alt, n_fwd, top.g_core[0].u_core.wait_cycles);
    $display("shape ops: maxpool=%0d upsample=%0d concat=%0d split=%0d add=%0d", n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]);
    begin
      int m [9];
      m = '{n_pad, n_stride, n_credit, u_ddr.rd_stalls, u_ddr.wr_stalls, n_contend, n_alt, n_fwd,
            top.g_core[0].u_core.wait_cycles};
      foreach (m[i]) begin checks++; if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end end
      foreach (n_op[i]) begin checks++; if (n_op[i] == 0) begin failures++; $display("shape op %0d never ran", i); end end
    end
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
