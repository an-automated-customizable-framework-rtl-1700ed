// tb_upsample: checks 2x nearest-neighbour upsampling on random maps with random input gaps and output back-pressure, against a reference computed here.
module tb_upsample;
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

  logic [10:0] cols = 0;
  upsample #(.MAX_COLS(64)) dut (.clk, .rst_n, .start, .cols, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
  task automatic one(int cg, int h, int w, int bp);
    longint unsigned img [];
    img = new [cg*h*w];
    ins.delete(); srcs.delete(); exps.delete();
    foreach (img[i]) begin img[i] = {$urandom, $urandom}; ins.push_back(img[i]); srcs.push_back(0); end
    for (int g = 0; g < cg; g++) for (int r = 0; r < 2*h; r++) for (int c = 0; c < 2*w; c++)
      exps.push_back(img[(g*h + r/2)*w + c/2]);
    cols = 11'(w);
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

    one(2, 3, 4, 0);
    one(2, 4, 5, 50);
    one(1, 2, 1, 20);
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
