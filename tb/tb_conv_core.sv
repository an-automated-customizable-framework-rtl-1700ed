// tb_conv_core: self-checking test of the Conv module.
//
// Runs several layers (3x3 with padding, 3x3 with stride 2, 1x1, and a layer
// that reuses the loaded parameters) through conv_core, feeding the input
// stream and draining the output stream, and compares every output word with
// tb_ref_pkg's integer convolution + requantization.  One layer is run with
// a free-flowing output to check the rate (one 8x8 beat per cycle); the others
// apply random back-pressure so the credit stall is exercised.
module tb_conv_core;
  import nna_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      start = 0;
  conv_cfg_t cfg;
  logic      busy, done;
  logic      in_valid = 0, in_ready;
  word_t     in_data = '0;
  logic      out_valid, out_ready = 0;
  word_t     out_data;

  conv_core #(.FB_DEPTH(2048), .WB_DEPTH(512), .MAX_OUT_CH(64)) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .in_valid, .in_ready, .in_data, .in_feat(), .out_valid, .out_ready, .out_data
  );

  int checks = 0, failures = 0;
  int stalls = 0;
  bit bp_on = 0;

  always_ff @(posedge clk) begin
    out_ready <= bp_on ? ($urandom_range(3) == 0) : 1'b1;
    if (dut.st == 2'd2 && !dut.issue) stalls++;
  end

  task automatic run_layer(int cin, int h, int w, int oc, int k, bit pad, bit str2, bit act,
                           bit load_params, bit bp, bit check_rate);
    longint unsigned words [$];
    int oh, ow, str, padv, cg, og, nq, nw, z1, z3, amend;
    int got, t_start, t_end, beats;
    str = str2 ? 2 : 1; padv = (pad && k == 3) ? 1 : 0;
    oh = (h + 2*padv - k) / str + 1; ow = (w + 2*padv - k) / str + 1;
    cg = (cin + 7) / 8; og = (oc + 7) / 8;
    z1 = $urandom_range(0, 40); z3 = $urandom_range(0, 30); amend = $urandom_range(0, 200) - 100;
    for (int c = 0; c < cg*8; c++) for (int r = 0; r < h; r++) for (int q = 0; q < w; q++)
      fm[c][r][q] = (c < cin) ? byte'($urandom_range(0, 255)) : byte'(z1);
    if (load_params) begin
      for (int o = 0; o < og*8; o++) begin
        bias[o] = $urandom_range(0, 4000) - 2000;
        mult[o] = $urandom_range(1, 300);
        shft[o] = $urandom_range(10, 16);
        for (int c = 0; c < cg*8; c++) for (int y = 0; y < 3; y++) for (int x = 0; x < 3; x++)
          wt[o][c][y][x] = (c < cin && o < oc) ? byte'($urandom_range(0, 255)) : 8'sd0;
      end
      for (int o = 0; o < og*8; o++) words.push_back(qparam_word(o));
      for (int g = 0; g < og; g++) for (int y = 0; y < k; y++) for (int x = 0; x < k; x++)
        for (int i = 0; i < cg; i++) for (int l = 0; l < 8; l++) words.push_back(weight_word(g, y, x, i, l));
    end
    nq = load_params ? og*8 : 0;
    nw = load_params ? og*k*k*cg*8 : 0;
    for (int i = 0; i < cg; i++) for (int r = 0; r < h; r++) for (int q = 0; q < w; q++)
      words.push_back(feature_word(i, r, q));

    cfg = decode_conv_cfg({10'(cin), 11'(w), 11'(h)},
                          {str2, 8'(z3), 3'd1, 8'(z1), act, pad, 10'(oc)},
                          {16'd0, (k == 3) ? CONV_3X3 : CONV_1X1},
                          {16'(nq), 16'(nw)}, 32'(amend));
    bp_on = bp;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    foreach (words[i]) begin
      in_valid <= 1; in_data <= words[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    t_start = $time / 10;
    got = 0;
    beats = og*oh*ow*k*k*cg;
    for (int g = 0; g < og; g++) for (int r = 0; r < oh; r++) for (int q = 0; q < ow; q++) begin
      do @(posedge clk); while (!(out_valid && out_ready));
      for (int l = 0; l < 8; l++) begin
        int exp;
        exp = conv_out(g*8 + l, r, q, cg*8, h, w, k, padv, str, z1, amend, z3, act);
        checks++;
        if (out_data[l*8 +: 8] != 8'(exp)) begin
          failures++;
          if (failures < 10) $display("MISMATCH og=%0d r=%0d c=%0d lane=%0d got=%0d exp=%0d",
                                      g, r, q, l, out_data[l*8 +: 8], exp);
        end
      end
      got++;
    end
    t_end = $time / 10;
    do @(posedge clk); while (!done);
    if (check_rate) begin
      // one beat per cycle plus a fixed pipeline depth of at most 16 cycles
      checks++;
      if ((t_end - t_start) < beats || (t_end - t_start) > beats + 16) begin
        failures++;
        $display("RATE: %0d cycles for %0d beats", t_end - t_start, beats);
      end
    end
    $display("layer cin=%0d %0dx%0d oc=%0d k=%0d: %0d outputs, %0d cycles for %0d beats",
             cin, h, w, oc, k, got, t_end - t_start, beats);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_layer(16, 6, 5, 16, 3, 1, 0, 1, 1, 0, 1);   // 3x3 pad 1, free flowing: rate check
    run_layer(16, 7, 7, 8, 3, 0, 1, 1, 1, 1, 0);    // 3x3 stride 2, back-pressure
    run_layer(24, 4, 4, 16, 1, 0, 0, 0, 1, 1, 0);   // 1x1, 24 channels, no activation
    run_layer(24, 3, 5, 16, 1, 0, 0, 1, 0, 1, 0);   // reuse parameters
    run_layer(3, 5, 5, 8, 3, 1, 0, 1, 1, 0, 0);     // first-layer style: 3 real channels
    run_layer(8, 8, 8, 16, 1, 0, 0, 1, 1, 1, 0);    // 1x1, one beat per pixel: fills the output FIFO
    checks++;
    if (stalls == 0) begin failures++; $display("credit stall never happened"); end
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
