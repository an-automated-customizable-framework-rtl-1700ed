// tb_add: checks element-wise addition with operands arriving in alternating bursts (src 0 then src 1), against a reference computed here.
module tb_add;
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

  logic [31:0] s1 = 0, s2 = 0;
  lane_t z1 = 0, z2 = 0, zo = 0;
  add #(.AFIFO_DEPTH(4)) dut (.clk, .rst_n, .start, .s1, .s2, .z1, .z2, .zo, .in_valid, .in_ready, .in_data, .in_src, .out_valid, .out_ready, .out_data);
  task automatic one(int n, int bp);
    longint unsigned a [], b [];
    ins.delete(); srcs.delete(); exps.delete();
    a = new [n]; b = new [n];
    s1 = $urandom_range(0, 32'h20000); s2 = $urandom_range(0, 32'h20000);
    z1 = 8'($urandom); z2 = 8'($urandom); zo = 8'($urandom);
    for (int i = 0; i < n; i++) begin a[i] = {$urandom, $urandom}; b[i] = {$urandom, $urandom}; end
    for (int k = 0; k < n; k += 4) begin
      for (int i = k; i < k + 4 && i < n; i++) begin ins.push_back(a[i]); srcs.push_back(0); end
      for (int i = k; i < k + 4 && i < n; i++) begin ins.push_back(b[i]); srcs.push_back(1); end
    end
    for (int i = 0; i < n; i++) begin
      longint unsigned v = 0;
      for (int l = 0; l < 8; l++)
        v |= longint'(ref_round_q16(rescale(ln(a[i], l), z1, s1) + rescale(ln(b[i], l), z2, s2), zo)) << (8*l);
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

    one(16, 0);
    one(18, 50);
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
