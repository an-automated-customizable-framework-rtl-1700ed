// tb_mem_arbiter: checks sharing of one memory port by two DMA engines.
//
// Two dma instances read different regions and write different regions at
// the same time through mem_arbiter into the behavioural memory.  Checks
// that each engine receives its own data, that both write regions are
// correct, and that the two engines really competed for the port.
module tb_mem_arbiter;
  import nna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        m_ar_valid [2], m_ar_ready [2], m_r_valid [2], m_r_ready [2];
  logic [31:0] m_ar_addr [2], m_aw_addr [2];
  logic [7:0]  m_ar_len [2], m_aw_len [2];
  logic        m_aw_valid [2], m_aw_ready [2], m_w_valid [2], m_w_ready [2], m_w_last [2];
  word_t       m_w_data [2], m_r_data;
  logic        m_r_last;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last, aw_valid, aw_ready, w_valid, w_ready, w_last;
  logic [31:0] ar_addr, aw_addr;
  logic [7:0] ar_len, aw_len;
  word_t r_data, w_data;

  logic  start = 0;
  logic  rd_valid [2], rd_ready [2], wr_valid [2], wr_ready [2], rd_busy [2], wr_busy [2], rd_src [2];
  word_t rd_data [2], wr_data [2];
  int    rbase [2] = '{64, 512}, wbase [2] = '{1024, 1536};
  localparam int N = 40;

  for (genvar m = 0; m < 2; m++) begin : g_m
    dma u_dma (
      .clk, .rst_n, .rd_start(start), .rd_addr(32'(rbase[m] * 8)), .rd_len(32'(N * 8)), .rd_split(1'b0),
      .rd_busy(rd_busy[m]), .rd_valid(rd_valid[m]), .rd_ready(rd_ready[m]), .rd_data(rd_data[m]), .rd_src(rd_src[m]),
      .wr_start(start), .wr_addr(32'(wbase[m] * 8)), .wr_len(32'(N * 8)), .wr_busy(wr_busy[m]),
      .wr_valid(wr_valid[m]), .wr_ready(wr_ready[m]), .wr_data(wr_data[m]),
      .ar_valid(m_ar_valid[m]), .ar_ready(m_ar_ready[m]), .ar_addr(m_ar_addr[m]), .ar_len(m_ar_len[m]),
      .r_valid(m_r_valid[m]), .r_ready(m_r_ready[m]), .r_data(m_r_data), .r_last(m_r_last),
      .aw_valid(m_aw_valid[m]), .aw_ready(m_aw_ready[m]), .aw_addr(m_aw_addr[m]), .aw_len(m_aw_len[m]),
      .w_valid(m_w_valid[m]), .w_ready(m_w_ready[m]), .w_data(m_w_data[m]), .w_last(m_w_last[m])
    );
  end

  mem_arbiter dut (.*);
  ddr_model #(.WORDS(4096)) u_ddr (.*);

  int checks = 0, failures = 0, contention = 0;
  int got [2] = '{0, 0}, sent [2] = '{0, 0};
  word_t wv [2][N];

  always @(posedge clk) if (m_ar_valid[0] && m_ar_valid[1]) contention++;

  initial begin
    for (int i = 0; i < 4096; i++) u_ddr.mem[i] = {$urandom, $urandom};
    for (int m = 0; m < 2; m++) for (int i = 0; i < N; i++) wv[m][i] = {$urandom, $urandom};
    for (int m = 0; m < 2; m++) begin rd_ready[m] = 0; wr_valid[m] = 0; wr_data[m] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (got[0] < N || got[1] < N || sent[0] < N || sent[1] < N) begin
      for (int m = 0; m < 2; m++) begin
        rd_ready[m] = ($urandom_range(3) != 0);
        wr_valid[m] = (sent[m] < N) && ($urandom_range(3) != 0);
        wr_data[m] = wv[m][sent[m] % N];
      end
      #1;
      for (int m = 0; m < 2; m++) begin
        if (rd_valid[m] && rd_ready[m]) begin
          checks++;
          if (rd_data[m] != u_ddr.mem[rbase[m] + got[m]]) begin failures++; $display("master %0d read %0d wrong", m, got[m]); end
          got[m]++;
        end
        if (wr_valid[m] && wr_ready[m]) sent[m]++;
      end
      @(negedge clk);
    end
    for (int m = 0; m < 2; m++) begin rd_ready[m] = 0; wr_valid[m] = 0; end
    while (wr_busy[0] || wr_busy[1]) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int m = 0; m < 2; m++) for (int i = 0; i < N; i++) begin
      checks++;
      if (u_ddr.mem[wbase[m] + i] != wv[m][i]) begin failures++; $display("master %0d write %0d wrong", m, i); end
    end
    checks++; if (contention == 0) begin failures++; $display("no contention"); end
    $display("contention cycles: %0d", contention);
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
