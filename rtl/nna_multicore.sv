// nna_multicore: NUM_CORES accelerator cores with direct Conv-to-Conv streams.
//
// A convolution whose output feeds several following convolutions (the two
// expand layers of a SqueezeNet Fire block, or the branches of a YOLO CSP
// block) would normally be written to external memory and read back once
// per consumer.  Here each core (nna_top) can instead send its Conv output
// straight to the Conv inputs of other cores, which then compute their
// layers at the same time from one pass of the data.
//
// How: core j sends when its Conv ControlReg[2] is set.  Core k receives when
// its Conv ControlReg[3] is set and ControlReg[7:4] names j; it loads its
// quantization words and weights from its own memory as usual and takes the
// feature map from core j.  A producer word moves only when every listening
// consumer of that producer is ready, so all consumers see every word in
// step (broadcast).  A core counts as listening while its Conv module is busy
// on such a layer, so the host starts the consumers before the producer; the
// producer then simply waits for them (its output FIFO holds back its issue).
//
// Interface: per core, the host instruction stream, register read port and
// idle flag, and a private external memory port (arrays indexed by core).
// Timing: the broadcast adds no register stage; a word leaves the producer's
// output FIFO in the cycle all consumers accept it.
// The multi-core idea, the default of one core and the fan-out of one Conv
// output into several Conv inputs follow the document; the register bits,
// one memory port per core and the broadcast handshake are this design's.
module nna_multicore
  import nna_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 1,
  parameter int unsigned BURST_BYTES = 32,
  parameter int unsigned FB_DEPTH    = 65536,
  parameter int unsigned WB_DEPTH    = 8192,
  parameter int unsigned BUF_LAT     = 2,
  parameter int unsigned MUL_LAT     = 3,
  parameter int unsigned ADD_LAT     = 1,
  parameter int unsigned MAX_COLS    = 2048,
  parameter bit          LEAKY_RELU  = 1'b1     // activation: 1 Leaky ReLU, 0 ReLU
) (
  input  logic        clk,
  input  logic        rst_n,
  // host, per core
  input  logic        instr_valid  [NUM_CORES],
  output logic        instr_ready  [NUM_CORES],
  input  instr_t      instr_data   [NUM_CORES],
  input  logic [7:0]  host_rd_addr [NUM_CORES],
  output logic [31:0] host_rd_data [NUM_CORES],
  output logic        idle         [NUM_CORES],
  // external memory, per core
  output logic        ar_valid [NUM_CORES],
  input  logic        ar_ready [NUM_CORES],
  output logic [31:0] ar_addr  [NUM_CORES],
  output logic [7:0]  ar_len   [NUM_CORES],
  input  logic        r_valid  [NUM_CORES],
  output logic        r_ready  [NUM_CORES],
  input  word_t       r_data   [NUM_CORES],
  input  logic        r_last   [NUM_CORES],
  output logic        aw_valid [NUM_CORES],
  input  logic        aw_ready [NUM_CORES],
  output logic [31:0] aw_addr  [NUM_CORES],
  output logic [7:0]  aw_len   [NUM_CORES],
  output logic        w_valid  [NUM_CORES],
  input  logic        w_ready  [NUM_CORES],
  output word_t       w_data   [NUM_CORES],
  output logic        w_last   [NUM_CORES]
);
  logic       co_valid [NUM_CORES], co_ready [NUM_CORES];
  word_t      co_data  [NUM_CORES];
  logic       ci_valid [NUM_CORES], ci_ready [NUM_CORES];
  word_t      ci_data  [NUM_CORES];
  logic       listen   [NUM_CORES];
  logic [3:0] src      [NUM_CORES];

  for (genvar k = 0; k < NUM_CORES; k++) begin : g_core
    nna_top #(.BURST_BYTES(BURST_BYTES), .FB_DEPTH(FB_DEPTH), .WB_DEPTH(WB_DEPTH),
              .BUF_LAT(BUF_LAT), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT),
              .MAX_COLS(MAX_COLS), .LEAKY_RELU(LEAKY_RELU)) u_core (
      .clk, .rst_n,
      .instr_valid(instr_valid[k]), .instr_ready(instr_ready[k]), .instr_data(instr_data[k]),
      .host_rd_addr(host_rd_addr[k]), .host_rd_data(host_rd_data[k]), .idle(idle[k]),
      .ar_valid(ar_valid[k]), .ar_ready(ar_ready[k]), .ar_addr(ar_addr[k]), .ar_len(ar_len[k]),
      .r_valid(r_valid[k]), .r_ready(r_ready[k]), .r_data(r_data[k]), .r_last(r_last[k]),
      .aw_valid(aw_valid[k]), .aw_ready(aw_ready[k]), .aw_addr(aw_addr[k]), .aw_len(aw_len[k]),
      .w_valid(w_valid[k]), .w_ready(w_ready[k]), .w_data(w_data[k]), .w_last(w_last[k]),
      .chain_out_valid(co_valid[k]), .chain_out_ready(co_ready[k]), .chain_out_data(co_data[k]),
      .chain_in_valid(ci_valid[k]), .chain_in_ready(ci_ready[k]), .chain_in_data(ci_data[k]),
      .chain_listen(listen[k]), .chain_src(src[k])
    );
  end

  // consumer k of producer j
  function automatic logic is_cons(int unsigned j, int unsigned k, logic lk, logic [3:0] sk);
    return lk && (32'(sk) == j) && (j != k);
  endfunction

  // A producer may send when it has at least one consumer and all of them
  // are ready; each consumer then sees valid in that same cycle.
  always_comb begin
    for (int unsigned j = 0; j < NUM_CORES; j++) begin
      logic any, all;
      any = 1'b0; all = 1'b1;
      for (int unsigned k = 0; k < NUM_CORES; k++)
        if (is_cons(j, k, listen[k], src[k])) begin
          any = 1'b1;
          all = all && ci_ready[k];
        end
      co_ready[j] = any && all;
    end
    for (int unsigned k = 0; k < NUM_CORES; k++) begin
      ci_valid[k] = 1'b0;
      ci_data[k]  = '0;
      for (int unsigned j = 0; j < NUM_CORES; j++)
        if (is_cons(j, k, listen[k], src[k])) begin
          ci_valid[k] = co_valid[j] && co_ready[j];
          ci_data[k]  = co_data[j];
        end
    end
  end
endmodule
