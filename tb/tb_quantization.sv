// tb_quantization: checks requantization against the integer model.
//
// Random accumulators, per-lane bias/scale/shift and per-layer amendment,
// zero point and activation enable; every output lane is compared with
// tb_ref_pkg::quant_ref two cycles after the input.  Extreme values check
// saturation at 0 and 255 and the Leaky ReLU branch.  A second instance
// built for plain ReLU runs on the same inputs.
module tb_quantization;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [7:0] in_tag = 0;
  logic signed [31:0] acc [8], bias [8];
  logic [15:0] mult [8];
  logic [5:0] shift [8];
  logic signed [31:0] amend = 0;
  logic [7:0] z3 = 0;
  logic act_en = 0;
  logic out_valid;
  logic [7:0] out_tag;
  logic [63:0] out_data;

  quantization dut (.*);

  logic        r_out_valid;
  logic [7:0]  r_out_tag;
  logic [63:0] r_out_data;
  quantization #(.LEAKY_RELU(1'b0)) dut_relu (
    .clk, .rst_n, .in_valid, .in_tag, .acc, .bias, .mult, .shift, .amend, .z3, .act_en,
    .out_valid(r_out_valid), .out_tag(r_out_tag), .out_data(r_out_data)
  );
  int unsigned expr [$];
  int n_relu_zero = 0;

  always @(negedge clk) if (r_out_valid) begin
    for (int l = 0; l < 8; l++) begin
      int unsigned e;
      e = expr.pop_front();
      checks++;
      if (r_out_data[l*8 +: 8] != 8'(e)) begin failures++; $display("relu lane %0d got %0d exp %0d", l, r_out_data[l*8 +: 8], e); end
    end
  end

  int checks = 0, failures = 0;
  int unsigned expq [$];
  int n_neg = 0, n_sat = 0;

  always @(negedge clk) if (out_valid) begin
    int unsigned e [8];
    for (int l = 0; l < 8; l++) e[l] = expq.pop_front();
    for (int l = 0; l < 8; l++) begin
      checks++;
      if (out_data[l*8 +: 8] != 8'(e[l])) begin failures++; $display("lane %0d got %0d exp %0d", l, out_data[l*8 +: 8], e[l]); end
    end
  end

  initial begin
    for (int l = 0; l < 8; l++) begin acc[l] = 0; bias[l] = 0; mult[l] = 0; shift[l] = 0; end
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      int unsigned e [8];
      int a_amend, a_z3;
      bit a_act;
      a_amend = $urandom_range(0, 2000) - 1000; a_z3 = $urandom_range(0, 255); a_act = $urandom_range(1);
      amend = a_amend; z3 = 8'(a_z3); act_en = a_act; in_valid = 1;
      for (int l = 0; l < 8; l++) begin
        int a, b, m, s;
        a = (n < 10) ? ((l[0]) ? 32'sh7fff_0000 : -32'sh7fff_0000) / 65536 * 3000 : $urandom_range(0, 400000) - 200000;
        b = $urandom_range(0, 20000) - 10000; m = $urandom_range(0, 65535); s = $urandom_range(0, 30);
        acc[l] = a; bias[l] = b; mult[l] = 16'(m); shift[l] = 6'(s);
        e[l] = quant_ref(a, b, m, s, a_amend, a_z3, a_act);
        expr.push_back(quant_ref(a, b, m, s, a_amend, a_z3, a_act, 1'b0));
        if (a_act && ((longint'(a) + b) * m + a_amend) < 0 && e[l] != quant_ref(a, b, m, s, a_amend, a_z3, a_act, 1'b0))
          n_relu_zero++;
        if (e[l] == 0 || e[l] == 255) n_sat++;
        if (a_act && ((longint'(a) + b) * m + a_amend) < 0) n_neg++;
      end
      for (int l = 0; l < 8; l++) expq.push_back(e[l]);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("missing outputs"); end
    checks++; if (n_neg == 0 || n_sat == 0 || n_relu_zero == 0) begin
      failures++; $display("coverage neg=%0d sat=%0d relu_differs=%0d", n_neg, n_sat, n_relu_zero);
    end
    checks++; if (expr.size() != 0) begin failures++; $display("missing ReLU outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
