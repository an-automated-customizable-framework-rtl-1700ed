// tb_nna_multicore: three cores computing a SqueezeNet-style Fire block.
//
// Core 0 runs the squeeze convolution (1x1, 16 -> 8 channels, 8x8) and
// broadcasts its output; cores 1 and 2 take that output as their feature
// map and run the two expand convolutions at the same time (1x1 and 3x3 with
// padding, 8 -> 16 channels), each writing to its own memory.  The squeeze
// output never goes to memory.  The consumers are started first; core 2's
// memory is slow, so the producer has to wait for it.  Results are compared
// word by word with the integer reference model.  Counted mechanisms:
// broadcast words, words taken by each consumer, producer wait cycles, and
// cycles in which both expand layers computed at the same time.
module tb_nna_multicore;
  import nna_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        instr_valid [N], instr_ready [N];
  instr_t      instr_data [N];
  logic [7:0]  host_rd_addr [N];
  logic [31:0] host_rd_data [N];
  logic        idle [N];
  logic        ar_valid [N], ar_ready [N], r_valid [N], r_ready [N], r_last [N];
  logic [31:0] ar_addr [N], aw_addr [N];
  logic [7:0]  ar_len [N], aw_len [N];
  logic        aw_valid [N], aw_ready [N], w_valid [N], w_ready [N], w_last [N];
  word_t       r_data [N], w_data [N];

  nna_multicore #(.NUM_CORES(N), .FB_DEPTH(4096), .WB_DEPTH(1024)) dut (.*);

  for (genvar k = 0; k < N; k++) begin : g_mem
    ddr_model #(.WORDS(8192)) u_ddr (
      .clk, .rst_n, .ar_valid(ar_valid[k]), .ar_ready(ar_ready[k]), .ar_addr(ar_addr[k]), .ar_len(ar_len[k]),
      .r_valid(r_valid[k]), .r_ready(r_ready[k]), .r_data(r_data[k]), .r_last(r_last[k]),
      .aw_valid(aw_valid[k]), .aw_ready(aw_ready[k]), .aw_addr(aw_addr[k]), .aw_len(aw_len[k]),
      .w_valid(w_valid[k]), .w_ready(w_ready[k]), .w_data(w_data[k]), .w_last(w_last[k])
    );
  end

  int checks = 0, failures = 0;
  int n_aw0 = 0;
  int n_bcast = 0, n_take1 = 0, n_take2 = 0, n_pwait = 0, n_both = 0;
  always_ff @(posedge clk) begin
    if (dut.co_valid[0] && dut.co_ready[0]) n_bcast++;
    if (aw_valid[0]) n_aw0++;
    if (dut.ci_valid[1] && dut.ci_ready[1]) n_take1++;
    if (dut.ci_valid[2] && dut.ci_ready[2]) n_take2++;
    if (dut.co_valid[0] && !dut.co_ready[0]) n_pwait++;
    if (dut.g_core[1].u_core.u_conv.st == 2'd2 && dut.g_core[2].u_core.u_conv.st == 2'd2) n_both++;
  end

  task automatic send(int k, opcode_e op, logic [7:0] addr, logic [31:0] data);
    instr_valid[k] <= 1; instr_data[k] <= '{op: op, addr: addr, data: data};
    @(posedge clk);
    while (!instr_ready[k]) @(posedge clk);
    instr_valid[k] <= 0;
  endtask

  task automatic wr(int k, reg_addr_e a, logic [31:0] d); send(k, OP_WRITE, a, d); endtask

  localparam int H = 8, W = 8, OUTW = 'h1000;
  longint unsigned exp1 [$], exp2 [$];
  int sq [8][H][W];

  // Parameters and (for core 0) features of one layer into core k's memory;
  // registers written; returns nothing, the Conv ControlReg is written last.
  task automatic setup(int k, int cin, int oc, int kk, int z1, int z3, int amend, bit with_feat,
                       bit gen, logic [31:0] ctrl);
    int n, cg, og, padv;
    cg = (cin + 7) / 8; og = (oc + 7) / 8; padv = (kk == 3) ? 1 : 0;
    if (gen)
      for (int o = 0; o < og*8; o++) begin
        bias[o] = $urandom_range(0, 2000) - 1000; mult[o] = $urandom_range(1, 200); shft[o] = $urandom_range(10, 14);
        for (int c = 0; c < cg*8; c++) for (int y = 0; y < 3; y++) for (int x = 0; x < 3; x++)
          wt[o][c][y][x] = byte'($urandom_range(0, 255));
      end
    n = 0;
    for (int o = 0; o < og*8; o++) begin
      case (k) 0: g_mem[0].u_ddr.mem[n] = qparam_word(o); 1: g_mem[1].u_ddr.mem[n] = qparam_word(o);
               default: g_mem[2].u_ddr.mem[n] = qparam_word(o); endcase
      n++;
    end
    for (int g = 0; g < og; g++) for (int y = 0; y < kk; y++) for (int x = 0; x < kk; x++)
      for (int i = 0; i < cg; i++) for (int l = 0; l < 8; l++) begin
        case (k) 0: g_mem[0].u_ddr.mem[n] = weight_word(g, y, x, i, l); 1: g_mem[1].u_ddr.mem[n] = weight_word(g, y, x, i, l);
                 default: g_mem[2].u_ddr.mem[n] = weight_word(g, y, x, i, l); endcase
        n++;
      end
    if (with_feat)
      for (int i = 0; i < cg; i++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
        g_mem[0].u_ddr.mem[n++] = feature_word(i, r, q);
    // expected results
    for (int g = 0; g < og; g++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++) begin
      logic [63:0] v;
      for (int l = 0; l < 8; l++) begin
        v[l*8 +: 8] = 8'(conv_out(g*8 + l, r, q, cg*8, H, W, kk, padv, 1, z1, amend, z3, 1));
        if (k == 0) sq[l][r][q] = int'(v[l*8 +: 8]);
      end
      if (k == 1) exp1.push_back(v);
      if (k == 2) exp2.push_back(v);
    end
    wr(k, R_CONV_IMGSIZE, {10'(cin), 11'(W), 11'(H)});
    wr(k, R_CONV_PARAM, {1'b0, 8'(z3), 3'd1, 8'(z1), 1'b1, padv[0], 10'(oc)});
    wr(k, R_CONV_TYPE, {16'd0, (kk == 3) ? CONV_3X3 : CONV_1X1});
    wr(k, R_CONV_PCOUNT, {16'(og*8), 16'(og*kk*kk*cg*8)});
    wr(k, R_CONV_AMEND, 32'(amend));
    wr(k, R_CONV_RADDR, 32'd0);
    wr(k, R_CONV_RLEN, 32'(n * 8));
    wr(k, R_CONV_WADDR, 32'(OUTW * 8));
    wr(k, R_CONV_WLEN, 32'(og*H*W*8));
    wr(k, R_CONV_CTRL, ctrl);
  endtask

  initial begin
    int z1a, z3a, t0;
    for (int k = 0; k < N; k++) begin
      instr_valid[k] = 0; instr_data[k] = '0; host_rd_addr[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    t0 = $time / 10;
    g_mem[2].u_ddr.stall_pct = 75;

    // squeeze layer data first (its output is the expand layers' input),
    // but its registers are written only after the consumers have started
    z1a = $urandom_range(0, 30); z3a = $urandom_range(0, 20);
    for (int c = 0; c < 16; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      fm[c][r][q] = byte'($urandom_range(0, 255));
    begin
      // reference of the squeeze layer, computed here so the expand
      // references can use it; the memory image is written by setup(0, ...)
      setup_squeeze_ref(z1a, z3a);
    end
    // expand layers: features from core 0 (ControlReg[7:4] = 0, [3] = 1)
    for (int c = 0; c < 8; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      fm[c][r][q] = byte'(sq[c][r][q]);
    setup(1, 8, 16, 1, z3a, $urandom_range(0, 20), $urandom_range(0, 100) - 50, 0, 1, 32'h0000_0009);
    for (int c = 0; c < 8; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      fm[c][r][q] = byte'(sq[c][r][q]);
    setup(2, 8, 16, 3, z3a, $urandom_range(0, 20), $urandom_range(0, 100) - 50, 0, 1, 32'h0000_0009);
    // squeeze layer: output to the other cores (ControlReg[2])
    restore_squeeze();
    setup(0, 16, 8, 1, z1a, z3a, sq_amend, 1, 0, 32'h0000_0005);
    for (int k = 0; k < N; k++) send(k, OP_WAIT, 0, 32'd1);
    for (int k = 0; k < N; k++) while (!idle[k]) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("Fire block finished in %0d cycles", $time / 10 - t0);

    foreach (exp1[i]) begin
      checks++;
      if (g_mem[1].u_ddr.mem[OUTW + i] != exp1[i]) begin
        failures++; if (failures < 10) $display("core1 word %0d: got %h exp %h", i, g_mem[1].u_ddr.mem[OUTW + i], exp1[i]);
      end
    end
    foreach (exp2[i]) begin
      checks++;
      if (g_mem[2].u_ddr.mem[OUTW + i] != exp2[i]) begin
        failures++; if (failures < 10) $display("core2 word %0d: got %h exp %h", i, g_mem[2].u_ddr.mem[OUTW + i], exp2[i]);
      end
    end
    // the squeeze output must not have been written to memory
    checks++; if (n_aw0 != 0) begin failures++; $display("squeeze output reached memory"); end
    checks++; if (n_bcast != 64) begin failures++; $display("broadcast %0d words, expected 64", n_bcast); end
    checks++; if (n_take1 != 64 || n_take2 != 64) begin failures++; $display("consumers took %0d / %0d", n_take1, n_take2); end
    $display("mechanisms: broadcast=%0d taken1=%0d taken2=%0d producer_wait=%0d both_computing=%0d",
             n_bcast, n_take1, n_take2, n_pwait, n_both);
    checks++; if (n_pwait == 0) begin failures++; $display("producer never waited"); end
    checks++; if (n_both == 0) begin failures++; $display("expand layers never overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // squeeze layer reference: saves its weights so that setup(0) can write
  // the same ones after the expand layers have overwritten the shared arrays
  byte         sq_fm [16][H][W];
  byte         sq_wt [8][16];
  int          sq_bias [8], sq_amend;
  int unsigned sq_mult [8], sq_shft [8];

  task automatic setup_squeeze_ref(int z1, int z3);
    sq_amend = $urandom_range(0, 100) - 50;
    for (int o = 0; o < 8; o++) begin
      bias[o] = $urandom_range(0, 2000) - 1000; mult[o] = $urandom_range(1, 200); shft[o] = $urandom_range(10, 14);
      sq_bias[o] = bias[o]; sq_mult[o] = mult[o]; sq_shft[o] = shft[o];
      for (int c = 0; c < 16; c++) begin wt[o][c][0][0] = byte'($urandom_range(0, 255)); sq_wt[o][c] = wt[o][c][0][0]; end
    end
    for (int c = 0; c < 16; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++) sq_fm[c][r][q] = fm[c][r][q];
    for (int o = 0; o < 8; o++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++)
      sq[o][r][q] = int'(conv_out(o, r, q, 16, H, W, 1, 0, 1, z1, sq_amend, z3, 1));
  endtask

  task automatic restore_squeeze();
    for (int c = 0; c < 16; c++) for (int r = 0; r < H; r++) for (int q = 0; q < W; q++) fm[c][r][q] = sq_fm[c][r][q];
    for (int o = 0; o < 8; o++) begin
      bias[o] = sq_bias[o]; mult[o] = sq_mult[o]; shft[o] = sq_shft[o];
      for (int c = 0; c < 16; c++) wt[o][c][0][0] = sq_wt[o][c];
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
