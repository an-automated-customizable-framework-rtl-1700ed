// tb_data_preproc: checks zero-point removal and padding.
//
// Random words, zero points and pad flags; each lane must equal
// pixel - z1, or 0 for padding, one cycle later.
module tb_data_preproc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_pad = 0;
  logic [63:0] in_word = 0;
  logic [7:0] z1 = 0;
  logic out_valid;
  logic signed [8:0] x [8];
  data_preproc dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      logic [63:0] wv; logic [7:0] zv; logic pv;
      wv = {$urandom, $urandom}; zv = 8'($urandom); pv = ($urandom_range(3) == 0);
      in_valid <= 1; in_word <= wv; z1 <= zv; in_pad <= pv;
      @(posedge clk); #1;
      checks++; if (out_valid !== 1'b1) failures++;
      for (int l = 0; l < 8; l++) begin
        int e;
        e = pv ? 0 : int'(wv[l*8 +: 8]) - int'(zv);
        checks++;
        if (int'(x[l]) != e) begin failures++; $display("lane %0d got %0d exp %0d", l, x[l], e); end
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
