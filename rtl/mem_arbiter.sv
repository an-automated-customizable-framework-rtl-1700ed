// mem_arbiter: shares one external memory port between two DMA engines.
//
// The Conv and Shape modules each own a DMA engine; this arbiter grants the
// memory's read address channel and write address channel, independently, to
// one engine at a time and keeps the grant until that burst's last data beat
// has passed, so data beats are routed to the engine that asked for them.
// Between bursts the grant alternates (round robin) when both engines ask.
// Port bundles are the DMA's simplified AXI-like channels.  The document
// shows one DMA between DDR and the two modules; this arbitration scheme is
// this design's choice.
module mem_arbiter
  import nna_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // masters
  input  logic        m_ar_valid [2],
  output logic        m_ar_ready [2],
  input  logic [31:0] m_ar_addr  [2],
  input  logic [7:0]  m_ar_len   [2],
  output logic        m_r_valid  [2],
  input  logic        m_r_ready  [2],
  output word_t       m_r_data,
  output logic        m_r_last,
  input  logic        m_aw_valid [2],
  output logic        m_aw_ready [2],
  input  logic [31:0] m_aw_addr  [2],
  input  logic [7:0]  m_aw_len   [2],
  input  logic        m_w_valid  [2],
  output logic        m_w_ready  [2],
  input  word_t       m_w_data   [2],
  input  logic        m_w_last   [2],
  // memory
  output logic        ar_valid,
  input  logic        ar_ready,
  output logic [31:0] ar_addr,
  output logic [7:0]  ar_len,
  input  logic        r_valid,
  output logic        r_ready,
  input  word_t       r_data,
  input  logic        r_last,
  output logic        aw_valid,
  input  logic        aw_ready,
  output logic [31:0] aw_addr,
  output logic [7:0]  aw_len,
  output logic        w_valid,
  input  logic        w_ready,
  output word_t       w_data,
  output logic        w_last
);
  logic r_lock, r_own, r_pri, r_sel;
  logic w_lock, w_own, w_pri, w_sel;

  // read address channel
  assign r_sel = m_ar_valid[r_pri] ? r_pri : ~r_pri;
  always_comb begin
    for (int m = 0; m < 2; m++) begin
      m_ar_ready[m] = !r_lock && (r_sel == 1'(m)) && ar_ready;
      m_r_valid[m]  = r_lock && (r_own == 1'(m)) && r_valid;
    end
    ar_valid = !r_lock && m_ar_valid[r_sel];
    ar_addr  = m_ar_addr[r_sel];
    ar_len   = m_ar_len[r_sel];
    r_ready  = r_lock && m_r_ready[r_own];
  end
  assign m_r_data = r_data;
  assign m_r_last = r_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_lock <= 1'b0; r_own <= 1'b0; r_pri <= 1'b0;
    end else if (!r_lock) begin
      if (ar_valid && ar_ready) begin
        r_lock <= 1'b1; r_own <= r_sel;
      end
    end else if (r_valid && r_ready && r_last) begin
      r_lock <= 1'b0; r_pri <= ~r_own;
    end
  end

  // write address and data channels
  assign w_sel = m_aw_valid[w_pri] ? w_pri : ~w_pri;
  always_comb begin
    for (int m = 0; m < 2; m++) begin
      m_aw_ready[m] = !w_lock && (w_sel == 1'(m)) && aw_ready;
      m_w_ready[m]  = w_lock && (w_own == 1'(m)) && w_ready;
    end
    aw_valid = !w_lock && m_aw_valid[w_sel];
    aw_addr  = m_aw_addr[w_sel];
    aw_len   = m_aw_len[w_sel];
    w_valid  = w_lock && m_w_valid[w_own];
    w_data   = m_w_data[w_own];
    w_last   = m_w_last[w_own];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_lock <= 1'b0; w_own <= 1'b0; w_pri <= 1'b0;
    end else if (!w_lock) begin
      if (aw_valid && aw_ready) begin
        w_lock <= 1'b1; w_own <= w_sel;
      end
    end else if (w_valid && w_ready && w_last) begin
      w_lock <= 1'b0; w_pri <= ~w_own;
    end
  end
endmodule
