// tb_instruction: checks instruction execution and WAIT blocking.
//
// Pushes a program of writes and waits.  Every write must appear on the
// register port in order; a WAIT on a busy module must hold back all later
// instructions until that module goes idle, and a WAIT on an idle module
// must not.  Also checks the wait-cycle counter and the idle flag.
module tb_instruction;
  import nna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  instr_t in_instr = '0;
  logic conv_busy = 0, shape_busy = 0;
  logic reg_wr_en, idle;
  logic [7:0] reg_wr_addr;
  logic [31:0] reg_wr_data, wait_cycles;
  instruction dut (.*);

  int checks = 0, failures = 0;
  int wr_seen [$];
  int wr_time [$];
  always @(posedge clk) if (reg_wr_en) begin wr_seen.push_back(reg_wr_data); wr_time.push_back($time / 10); end

  task automatic push(opcode_e op, logic [7:0] a, logic [31:0] d);
    @(negedge clk); in_valid = 1; in_instr = '{op: op, addr: a, data: d};
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int t_release;
    repeat (2) @(negedge clk); rst_n = 1;
    conv_busy = 1;
    push(OP_WRITE, 8'h02, 32'd100);
    push(OP_WAIT, 8'h00, 32'd1);       // waits on Conv
    push(OP_WRITE, 8'h03, 32'd101);
    push(OP_WAIT, 8'h00, 32'd2);       // Shape idle: no wait
    push(OP_NOP, 8'h00, 32'd0);
    push(OP_WRITE, 8'h04, 32'd102);
    repeat (20) @(negedge clk);
    checks++; if (wr_seen.size() != 1) begin failures++; $display("write passed a blocking WAIT"); end
    checks++; if (idle) failures++;
    conv_busy = 0;
    t_release = $time / 10;
    repeat (10) @(negedge clk);
    checks++; if (wr_seen.size() != 3) begin failures++; $display("writes after release: %0d", wr_seen.size()); end
    checks++; if (wr_seen.size() == 3 && (wr_seen[0] != 100 || wr_seen[1] != 101 || wr_seen[2] != 102)) failures++;
    checks++; if (wr_time.size() == 3 && (wr_time[1] - t_release > 2)) begin failures++; $display("slow release"); end
    checks++; if (wait_cycles < 20) begin failures++; $display("wait cycles %0d", wait_cycles); end
    checks++; if (!idle) failures++;
    // a long burst of writes through the FIFO, back to back
    for (int i = 0; i < 40; i++) push(OP_WRITE, 8'h05, 32'(200 + i));
    repeat (5) @(negedge clk);
    checks++; if (wr_seen.size() != 43) begin failures++; $display("lost writes"); end
    for (int i = 0; i < 40 && i + 3 < wr_seen.size(); i++) begin checks++; if (wr_seen[3 + i] != 200 + i) failures++; end
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
