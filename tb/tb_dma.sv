// tb_dma: checks the DMA engine against the behavioural memory.
//
// Plain read of a region, split read (alternating bursts from two halves,
// with the half flagged on rd_src), and a write of a random stream, all with
// random memory stalls and consumer back-pressure.  Checks every word, that
// no burst exceeds BURST_BYTES, and that the write bursts end with w_last.
module tb_dma;
  import nna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_start = 0, rd_split = 0, rd_busy, rd_valid, rd_ready = 0, rd_src;
  logic [31:0] rd_addr = 0, rd_len = 0, wr_addr = 0, wr_len = 0;
  logic wr_start = 0, wr_busy, wr_valid = 0, wr_ready;
  word_t rd_data, wr_data = 0;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last, aw_valid, aw_ready, w_valid, w_ready, w_last;
  logic [31:0] ar_addr, aw_addr;
  logic [7:0] ar_len, aw_len;
  word_t r_data, w_data;

  dma #(.BURST_BYTES(32)) dut (.*);
  ddr_model #(.WORDS(4096)) u_ddr (.*);

  int checks = 0, failures = 0, long_bursts = 0;
  always @(posedge clk) begin
    if (ar_valid && ar_ready && ar_len > 3) long_bursts++;
    if (aw_valid && aw_ready && aw_len > 3) long_bursts++;
  end

  task automatic read_region(int base_w, int nwords, bit split);
    int got, exp_w;
    int ia, ib;
    @(negedge clk);
    rd_addr = base_w * 8; rd_len = nwords * 8; rd_split = split; rd_start = 1;
    @(negedge clk); rd_start = 0;
    got = 0; ia = 0; ib = 0;
    while (got < nwords) begin
      rd_ready = ($urandom_range(3) != 0);
      #1;
      if (rd_valid && rd_ready) begin
        if (!split) exp_w = base_w + got;
        else if (!rd_src) exp_w = base_w + ia++;
        else exp_w = base_w + nwords/2 + ib++;
        checks++;
        if (rd_data != u_ddr.mem[exp_w]) begin failures++; $display("read word %0d wrong", got); end
        if (split) begin
          // halves alternate in bursts of 4
          checks++;
          if (rd_src != ((got / 4) % 2 == 1)) begin failures++; $display("src order at %0d", got); end
        end
        got++;
      end
      @(negedge clk);
    end
    rd_ready = 0;
    repeat (3) @(negedge clk);
    checks++; if (rd_busy) begin failures++; $display("read still busy"); end
  endtask

  task automatic write_region(int base_w, int nwords);
    word_t v [];
    int sent;
    v = new [nwords];
    foreach (v[i]) v[i] = {$urandom, $urandom};
    @(negedge clk);
    wr_addr = base_w * 8; wr_len = nwords * 8; wr_start = 1;
    @(negedge clk); wr_start = 0;
    sent = 0;
    while (sent < nwords) begin
      wr_valid = ($urandom_range(3) != 0); wr_data = v[sent];
      #1;
      if (wr_valid && wr_ready) sent++;
      @(negedge clk);
    end
    wr_valid = 0;
    while (wr_busy) @(negedge clk);
    repeat (2) @(negedge clk);
    foreach (v[i]) begin
      checks++;
      if (u_ddr.mem[base_w + i] != v[i]) begin failures++; $display("write word %0d wrong", i); end
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) u_ddr.mem[i] = {$urandom, $urandom};
    repeat (2) @(negedge clk); rst_n = 1;
    read_region(100, 23, 0);
    read_region(300, 32, 1);
    write_region(700, 19);
    write_region(900, 4);
    checks++; if (long_bursts != 0) begin failures++; $display("burst too long"); end
    checks++; if (u_ddr.wlast_errors != 0) begin failures++; $display("w_last wrong"); end
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
