// tb_conv_compute: checks the 8x8 multiply-accumulate array.
//
// Sends groups of random beats (first ... last) with random idle cycles in
// between, keeps reference sums per output channel, and compares the emitted
// accumulators and tags.  Also checks the latency: acc_valid rises exactly
// MUL_LAT + ADD_LAT + 1 cycles after the last beat of a group.
module tb_conv_compute;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int MUL_LAT = 3, ADD_LAT = 1, LAT = MUL_LAT + ADD_LAT + 1;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] in_tag = 0;
  logic signed [8:0] x [8];
  logic signed [7:0] w [8][8];
  logic acc_valid;
  logic [7:0] acc_tag;
  logic signed [31:0] acc [8];

  conv_compute #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_acc [$];
  int exp_tag [$];
  longint last_time [$];

  // Outputs are sampled at the falling edge.  A beat presented in cycle 0
  // makes acc_valid high in cycle LAT.
  always @(negedge clk) if (acc_valid) begin
    longint e [8];
    int lc;
    for (int o = 0; o < 8; o++) e[o] = exp_acc.pop_front();
    lc = int'(($time - last_time.pop_front()) / 10) + 1;
    checks++;
    if (acc_tag != 8'(exp_tag.pop_front())) begin failures++; $display("tag mismatch"); end
    checks++;
    if (lc != LAT) begin failures++; $display("latency %0d", lc); end
    for (int o = 0; o < 8; o++) begin
      checks++;
      if (acc[o] != 32'(e[o])) begin failures++; $display("acc[%0d]=%0d exp %0d", o, acc[o], e[o]); end
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) begin x[i] = 0; for (int o = 0; o < 8; o++) w[o][i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int g = 0; g < 40; g++) begin
      longint s [8];
      int n;
      n = $urandom_range(1, 12);
      s = '{default: 0};
      for (int b = 0; b < n; b++) begin
        in_valid = 1; in_first = (b == 0); in_last = (b == n - 1); in_tag = 8'(g);
        for (int i = 0; i < 8; i++) begin
          logic signed [8:0] xv;
          xv = $signed(9'($urandom_range(0, 510)) - 9'sd255);
          x[i] = xv;
          for (int o = 0; o < 8; o++) begin
            logic signed [7:0] wv;
            wv = $signed(8'($urandom));
            w[o][i] = wv;
            s[o] += longint'(xv) * longint'(wv);
          end
        end
        @(negedge clk);
        if (b == n - 1) begin for (int o = 0; o < 8; o++) exp_acc.push_back(s[o]); exp_tag.push_back(g); last_time.push_back($time); end
        if ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0; in_first = 0; in_last = 0;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_acc.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
