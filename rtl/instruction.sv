// instruction: the Instruction module - runs the host's instruction stream.
//
// The host pushes 48-bit instructions (instr_t: opcode, register address,
// data) into a FIFO.  The unit executes them in order, one per cycle:
//   OP_WRITE  writes data to register addr (a ControlReg write with bit 0
//             set starts the Conv or Shape module);
//   OP_WAIT   blocks until every module selected in data[1:0]
//             (bit 0 Conv, bit 1 Shape) is idle;
//   OP_NOP    does nothing.
// This is how the unit selects and switches between the computation modes of
// the two modules: a WAIT between dependent layers, none between independent
// ones, so Conv and Shape may run at the same time.  `idle` is high when the
// FIFO is empty and nothing is waiting.  The document says what the module is
// for; the instruction format is this design's.
module instruction
  import nna_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  instr_t      in_instr,
  input  logic        conv_busy,
  input  logic        shape_busy,
  output logic        reg_wr_en,
  output logic [7:0]  reg_wr_addr,
  output logic [31:0] reg_wr_data,
  output logic        idle,
  output logic [31:0] wait_cycles    // cycles spent blocked on OP_WAIT
);
  logic   q_valid, q_ready;
  instr_t q;
  logic [$clog2(FIFO_DEPTH+1)-1:0] q_count;

  sync_fifo #(.WIDTH($bits(instr_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(1'b0),
    .in_valid, .in_ready, .in_data(in_instr),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q), .count(q_count)
  );

  logic blocked;
  always_comb begin
    blocked = (q.op == OP_WAIT) &&
              ((q.data[0] && conv_busy) || (q.data[1] && shape_busy));
    q_ready     = q_valid && !blocked;
    reg_wr_en   = q_valid && (q.op == OP_WRITE);
    reg_wr_addr = q.addr;
    reg_wr_data = q.data;
    idle        = !q_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wait_cycles <= '0;
    else if (q_valid && blocked) wait_cycles <= wait_cycles + 32'd1;
  end
endmodule
