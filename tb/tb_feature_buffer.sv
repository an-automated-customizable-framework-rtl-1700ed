// tb_feature_buffer: checks writes, reads and the read latency.
//
// Fills a reduced-depth buffer with random words, then issues a new read
// address every cycle and checks each word RD_LAT cycles later, while
// writes to other addresses continue.
module tb_feature_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int DEPTH = 256, RD_LAT = 2;
  logic wr_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  logic [63:0] wr_data = 0, rd_data;
  feature_buffer #(.DEPTH(DEPTH), .RD_LAT(RD_LAT)) dut (.*);
  logic [63:0] ref_m [DEPTH];
  int checks = 0, failures = 0;
  int q [$];
  initial begin
    for (int j = 0; j < DEPTH; j++) begin
      ref_m[j] = {$urandom, $urandom};
      wr_en <= 1; wr_addr <= 8'(j); wr_data <= ref_m[j];
      @(posedge clk);
    end
    wr_en <= 0;
    for (int n = 0; n < 300 + RD_LAT; n++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      rd_addr <= 8'(a);
      @(posedge clk);
      q.push_back(a);
      #1;
      if (q.size() >= RD_LAT) begin
        int e;
        e = q.pop_front();
        checks++;
        if (rd_data != ref_m[e]) begin failures++; $display("addr %0d", e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
