// tb_shape_core: checks the Shape module's switches and operators.
//
// Runs each operator through shape_core in turn, selecting it with the
// control word, feeding a random input stream with gaps and draining the
// output with back-pressure.  Compares the outputs with references computed
// here, and checks busy/done: the module must finish after exactly
// out_words words and ignore the operators it did not select.
module tb_shape_core;
  import nna_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [31:0] ctrl = 0, dsize = 0, c2 = 0, s1 = 0, s2 = 0, z1 = 0, z2 = 0, out_words = 0;
  logic busy, done;
  logic in_valid = 0, in_ready, in_src = 0, out_valid, out_ready = 0;
  word_t in_data = 0, out_data;
  shape_core #(.MAX_COLS(64), .BURST_BYTES(32)) dut (.*);

  int checks = 0, failures = 0;
  longint unsigned ins [$], srcs [$], exps [$];

  function automatic int unsigned ln(longint unsigned v, int l); return int'((v >> (8*l)) & 8'hff); endfunction

  task automatic run(shape_op_e op, int zo);
    int ii, io;
    bit in_fire;
    @(negedge clk);
    ctrl = {16'd0, 8'(zo), 4'd0, op, 1'b1}; out_words = exps.size(); start = 1;
    @(negedge clk); start = 0;
    ii = 0; io = 0; in_fire = 0;
    checks++; if (!busy) failures++;
    while (io < exps.size()) begin
      if (!in_valid || in_fire) begin
        if (in_fire) ii++;
        in_valid = (ii < ins.size()) && ($urandom_range(3) != 0);
        if (ii < ins.size()) begin in_data = ins[ii]; in_src = srcs[ii][0]; end
      end
      out_ready = ($urandom_range(3) != 0);
      #1;
      in_fire = in_valid && in_ready;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != exps[io]) begin failures++; if (failures < 6) $display("op %0d word %0d got %h exp %h", op, io, out_data, exps[io]); end
        io++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    checks++; if (busy || !done) begin failures++; $display("op %0d: busy=%0d done=%0d", op, busy, done); end
  endtask

  initial begin
    longint unsigned a [], v;
    repeat (2) @(negedge clk); rst_n = 1;
    // max pooling: 2 groups, 4x4
    a = new [32];
    foreach (a[i]) a[i] = {$urandom, $urandom};
    ins = a; srcs = '{}; foreach (a[i]) srcs.push_back(0);
    dsize = {10'd16, 11'd4, 11'd4}; exps = '{};
    for (int g = 0; g < 2; g++) for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
      v = 0;
      for (int l = 0; l < 8; l++) begin
        int m;
        m = 0;
        for (int d = 0; d < 4; d++) if (ln(a[(g*4 + 2*r + d/2)*4 + 2*c + d%2], l) > m) m = ln(a[(g*4 + 2*r + d/2)*4 + 2*c + d%2], l);
        v |= longint'(m) << (8*l);
      end
      exps.push_back(v);
    end
    run(SHP_MAXPOOL, 0);
    // upsampling of the same input (2 groups, 4x4 -> 8x8)
    exps = '{};
    for (int g = 0; g < 2; g++) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) exps.push_back(a[(g*4 + r/2)*4 + c/2]);
    run(SHP_UPSAMPLE, 0);
    // concatenation: first 16 words (8 channels, 4x2... c1 = 8, 4x4) then 16 more
    dsize = {10'd8, 11'd4, 11'd4}; s1 = 32'h0001_8000; s2 = 32'h0000_6000; z1 = 20; z2 = 3; exps = '{};
    foreach (a[i]) begin
      v = 0;
      for (int l = 0; l < 8; l++)
        v |= longint'(ref_round_q16(i < 16 ? rescale(ln(a[i], l), 20, s1) : rescale(ln(a[i], l), 3, s2), 9)) << (8*l);
      exps.push_back(v);
    end
    run(SHP_CONCAT, 9);
    // split: skip the first 8 channels (16 words)
    dsize = {10'd16, 11'd4, 11'd4}; c2 = 8; exps = '{};
    for (int i = 16; i < 32; i++) exps.push_back(a[i]);
    run(SHP_SPLIT, 0);
    // add: 16 + 16 words in alternating bursts of 4
    ins = '{}; srcs = '{}; exps = '{};
    for (int k = 0; k < 16; k += 4) begin
      for (int i = k; i < k + 4; i++) begin ins.push_back(a[i]); srcs.push_back(0); end
      for (int i = k; i < k + 4; i++) begin ins.push_back(a[16 + i]); srcs.push_back(1); end
    end
    for (int i = 0; i < 16; i++) begin
      v = 0;
      for (int l = 0; l < 8; l++)
        v |= longint'(ref_round_q16(rescale(ln(a[i], l), 20, s1) + rescale(ln(a[16 + i], l), 3, s2), 1)) << (8*l);
      exps.push_back(v);
    end
    run(SHP_ADD, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
