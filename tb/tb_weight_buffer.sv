// tb_weight_buffer: checks word writes, 8x8 block reads and read latency.
//
// Writes random words to a reduced-depth buffer, then reads every row and
// checks all 64 weights, appearing exactly RD_LAT cycles after the address.
module tb_weight_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int DEPTH = 64, RD_LAT = 2;
  logic wr_en = 0;
  logic [$clog2(DEPTH)+2:0] wr_addr = 0;
  logic [63:0] wr_data = 0;
  logic [$clog2(DEPTH)-1:0] rd_addr = 0;
  logic signed [7:0] rd_w [8][8];
  weight_buffer #(.DEPTH(DEPTH), .RD_LAT(RD_LAT)) dut (.*);
  logic [63:0] ref_w [DEPTH*8];
  int checks = 0, failures = 0;
  initial begin
    for (int j = 0; j < DEPTH*8; j++) begin
      ref_w[j] = {$urandom, $urandom};
      wr_en <= 1; wr_addr <= ($clog2(DEPTH)+3)'(j); wr_data <= ref_w[j];
      @(posedge clk);
    end
    wr_en <= 0;
    for (int r = 0; r < DEPTH; r++) begin
      rd_addr <= ($clog2(DEPTH))'(r);
      @(posedge clk);
      rd_addr <= ($clog2(DEPTH))'(r + 7);   // a different address after one cycle
      repeat (RD_LAT - 1) @(posedge clk);
      #1;
      for (int o = 0; o < 8; o++) for (int i = 0; i < 8; i++) begin
        checks++;
        if (rd_w[o][i] != $signed(ref_w[r*8 + o][i*8 +: 8])) begin
          failures++;
          if (failures < 5) $display("row %0d o %0d i %0d", r, o, i);
        end
      end
    end
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
