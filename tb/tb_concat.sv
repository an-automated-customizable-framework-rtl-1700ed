// tb_concat: checks channel concatenation with requantization: the first n1 words use scale/zero 1, the rest scale/zero 2, compared with a reference computed here.
module tb_concat;
  import nna_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, in_src = 0;
  word_t in_data = '0, out_data;
  int checks = 0, failures = 0;
  longint unsigned ins [$], srcs [$], exps [$];
  int nout;

  logic [31:0] n1 = 0, s1 = 0, s2 = 0;
  lane_t z1 = 0, z2 = 0, zo = 0;
  concat dut (.clk, .rst_n, .start, .n1, .s1, .s2, .z1, .z2, .zo, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
  task automatic one(int na, int nb, int bp);
    ins.delete(); srcs.delete(); exps.delete();
    n1 = na; s1 = $urandom_range(0, 32'h30000); s2 = $urandom_range(0, 32'h30000);
    z1 = 8'($urandom); z2 = 8'($urandom); zo = 8'($urandom);
    for (int i = 0; i < na + nb; i++) begin
      longint unsigned x, v;
      x = {$urandom, $urandom}; v = 0;
      ins.push_back(x); srcs.push_back(0);
      for (int l = 0; l < 8; l++)
        v |= longint'(ref_round_q16(i < na ? rescale(ln(x, l), z1, s1) : rescale(ln(x, l), z2, s2), zo)) << (8*l);
      exps.push_back(v);
    end
    run_stream(bp);
  endtask
  // One stimulus/response process: decisions at the falling edge, the
  // handshakes they imply happen at the next rising edge.
  task automatic run_stream(int bp_pct);
    int ii, io;
    bit in_fire;
    ii = 0; io = 0; in_fire = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (io < exps.size()) begin
      @(negedge clk);
      if (!in_valid || in_fire) begin
        if (in_fire) ii++;
        in_valid = (ii < ins.size()) && ($urandom_range(99) >= 20);
        if (ii < ins.size()) begin in_data = ins[ii]; in_src = srcs[ii][0]; end
      end
      out_ready = ($urandom_range(99) >= bp_pct);
      #1;
      in_fire = in_valid && in_ready;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != exps[io]) begin
          failures++;
          if (failures < 6) $display("word %0d: got %h exp %h", io, out_data, exps[io]);
        end
        io++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("extra output"); end
  endtask

  function automatic int unsigned ln(longint unsigned v, int l); return int'((v >> (8*l)) & 8'hff); endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;

    one(16, 24, 0);
    one(30, 10, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
