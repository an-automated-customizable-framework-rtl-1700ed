// tb_dsp_mul2: checks the packed two-product multiplier.
//
// Drives random and extreme signed weights and activations every cycle and
// compares both products, LAT cycles later, with plain multiplication.
module tb_dsp_mul2;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int LAT = 3;
  logic signed [7:0]  wa = 0, wd = 0;
  logic signed [8:0]  x = 0;
  logic signed [16:0] pa, pd;
  dsp_mul2 #(.LAT(LAT)) dut (.clk, .wa, .wd, .x, .pa, .pd);

  int checks = 0, failures = 0;
  int ea [$], ed [$];

  initial begin
    for (int n = 0; n < 400; n++) begin
      if (n < 4) begin
        wa <= (n[0]) ? -8'sd128 : 8'sd127; wd <= (n[1]) ? -8'sd128 : 8'sd127;
        x <= (n[0] ^ n[1]) ? -9'sd255 : 9'sd255;
      end else begin
        wa <= $signed(8'($urandom)); wd <= $signed(8'($urandom));
        x <= $signed(9'($urandom_range(0, 510)) - 9'sd255);
      end
      @(posedge clk);
      ea.push_back(int'(wa) * int'(x)); ed.push_back(int'(wd) * int'(x));
      if (ea.size() >= LAT) begin
        int a, d;
        a = ea.pop_front(); d = ed.pop_front();
        checks += 2;
        #1;
        if (pa != 17'(a)) begin failures++; $display("pa %0d exp %0d", pa, a); end
        if (pd != 17'(d)) begin failures++; $display("pd %0d exp %0d", pd, d); end
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
