// dma: burst DMA engine between a module and external memory.
//
// Read side: given a byte address and a byte length (DMA read address and
// length registers), it issues read bursts of at most BURST_BYTES and hands
// the returned 64-bit words on as a stream.  In split mode (used by the
// element-wise add) the region is taken as two equal halves, A then B, and
// bursts alternate between them (A0, B0, A1, B1, ...); rd_src tells which half
// a word came from.  Write side: given a byte address and length it issues
// write bursts, each once a whole burst of the incoming stream is buffered.
// Memory port: a simplified AXI-like protocol with an address channel (valid,
// ready, address, beats-1) and a data channel (valid, ready, data, last) for
// each direction; one burst is outstanding per direction.  Lengths must be
// multiples of 8 bytes.  The 32-byte default burst is the document's; the
// protocol and split mode are this design's choices.
module dma
  import nna_pkg::*;
#(
  parameter int unsigned BURST_BYTES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // read control
  input  logic        rd_start,
  input  logic [31:0] rd_addr,
  input  logic [31:0] rd_len,
  input  logic        rd_split,
  output logic        rd_busy,
  // read stream out
  output logic        rd_valid,
  input  logic        rd_ready,
  output word_t       rd_data,
  output logic        rd_src,
  // write control
  input  logic        wr_start,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_len,
  output logic        wr_busy,
  // write stream in
  input  logic        wr_valid,
  output logic        wr_ready,
  input  word_t       wr_data,
  // memory read port
  output logic        ar_valid,
  input  logic        ar_ready,
  output logic [31:0] ar_addr,
  output logic [7:0]  ar_len,
  input  logic        r_valid,
  output logic        r_ready,
  input  word_t       r_data,
  input  logic        r_last,
  // memory write port
  output logic        aw_valid,
  input  logic        aw_ready,
  output logic [31:0] aw_addr,
  output logic [7:0]  aw_len,
  output logic        w_valid,
  input  logic        w_ready,
  output word_t       w_data,
  output logic        w_last
);
  localparam int unsigned BW = BURST_BYTES / 8;   // words per burst

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} dma_state_e;

  // ---------------- read engine ----------------
  dma_state_e rs;
  logic [31:0] rptr [2];
  logic [28:0] rrem [2];
  logic        rcur, rsplit;
  logic [8:0]  rbeats;
  logic [8:0]  rburst;

  assign rburst   = (rrem[rcur] > 29'(BW)) ? 9'(BW) : 9'(rrem[rcur]);
  assign ar_valid = (rs == S_ADDR);
  assign ar_addr  = rptr[rcur];
  assign ar_len   = 8'(rburst - 9'd1);
  assign r_ready  = (rs == S_DATA) && rd_ready;
  assign rd_valid = (rs == S_DATA) && r_valid;
  assign rd_data  = r_data;
  assign rd_src   = rcur;
  assign rd_busy  = (rs != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= S_IDLE; rcur <= 1'b0; rsplit <= 1'b0; rbeats <= '0;
      rptr[0] <= '0; rptr[1] <= '0; rrem[0] <= '0; rrem[1] <= '0;
    end else begin
      unique case (rs)
        S_IDLE: if (rd_start && rd_len[31:3] != '0) begin
          rcur   <= 1'b0;
          rsplit <= rd_split;
          rptr[0] <= rd_addr;
          if (rd_split) begin
            rptr[1] <= rd_addr + {1'b0, rd_len[31:1]};
            rrem[0] <= 29'(rd_len[31:4]);
            rrem[1] <= 29'(rd_len[31:4]);
          end else begin
            rptr[1] <= '0;
            rrem[0] <= rd_len[31:3];
            rrem[1] <= '0;
          end
          rs <= S_ADDR;
        end
        S_ADDR: if (ar_ready) begin
          rbeats     <= rburst;
          rptr[rcur] <= rptr[rcur] + 32'(rburst) * 32'd8;
          rrem[rcur] <= rrem[rcur] - 29'(rburst);
          rs <= S_DATA;
        end
        S_DATA: if (r_valid && r_ready) begin
          rbeats <= rbeats - 9'd1;
          if (rbeats == 9'd1) begin
            if (rsplit && rrem[~rcur] != '0) begin
              rcur <= ~rcur; rs <= S_ADDR;
            end else if (rrem[rcur] != '0) begin
              rs <= S_ADDR;
            end else begin
              rs <= S_IDLE;
            end
          end
        end
        default: rs <= S_IDLE;
      endcase
    end
  end

  // ---------------- write engine ----------------
  // Incoming words collect in a one-burst FIFO; the burst address is issued
  // only once the whole burst is buffered, so a granted write burst never
  // waits on its producer (which could otherwise wait on the memory port).
  dma_state_e ws;
  logic [31:0] wptr;
  logic [28:0] wrem;
  logic [8:0]  wbeats;
  logic [8:0]  wburst;
  logic        wf_valid;
  word_t       wf_data;
  logic [$clog2(BW+1)-1:0] wf_count;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(BW)) u_wfifo (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(wr_valid), .in_ready(wr_ready), .in_data(wr_data),
    .out_valid(wf_valid), .out_ready(w_valid && w_ready), .out_data(wf_data), .count(wf_count)
  );

  assign wburst   = (wrem > 29'(BW)) ? 9'(BW) : 9'(wrem);
  assign aw_valid = (ws == S_ADDR) && (9'(wf_count) >= wburst);
  assign aw_addr  = wptr;
  assign aw_len   = 8'(wburst - 9'd1);
  assign w_valid  = (ws == S_DATA) && wf_valid;
  assign w_data   = wf_data;
  assign w_last   = (wbeats == 9'd1);
  assign wr_busy  = (ws != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= S_IDLE; wptr <= '0; wrem <= '0; wbeats <= '0;
    end else begin
      unique case (ws)
        S_IDLE: if (wr_start && wr_len[31:3] != '0) begin
          wptr <= wr_addr;
          wrem <= wr_len[31:3];
          ws   <= S_ADDR;
        end
        S_ADDR: if (aw_valid && aw_ready) begin
          wbeats <= wburst;
          wptr   <= wptr + 32'(wburst) * 32'd8;
          wrem   <= wrem - 29'(wburst);
          ws     <= S_DATA;
        end
        S_DATA: if (w_valid && w_ready) begin
          wbeats <= wbeats - 9'd1;
          if (wbeats == 9'd1) ws <= (wrem != '0) ? S_ADDR : S_IDLE;
        end
        default: ws <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // A burst address, once offered, must stay stable until accepted.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ar_valid && !ar_ready |=> ar_valid && $stable(ar_addr));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    aw_valid && !aw_ready |=> aw_valid && $stable(aw_addr));
`endif
endmodule
