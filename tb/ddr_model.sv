// ddr_model: behavioural external memory for the testbenches.
//
// A word array (64-bit words, byte address / 8) behind the simplified AXI
// read and write channels: one burst at a time per direction, address and
// data handshakes with random ready/valid gaps so the design sees stalls.
// Not synthesizable in intent; it stands in for the off-chip DRAM.
module ddr_model #(
  parameter int unsigned WORDS = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ar_valid,
  output logic        ar_ready,
  input  logic [31:0] ar_addr,
  input  logic [7:0]  ar_len,
  output logic        r_valid,
  input  logic        r_ready,
  output logic [63:0] r_data,
  output logic        r_last,
  input  logic        aw_valid,
  output logic        aw_ready,
  input  logic [31:0] aw_addr,
  input  logic [7:0]  aw_len,
  input  logic        w_valid,
  output logic        w_ready,
  input  logic [63:0] w_data,
  input  logic        w_last
);
  logic [63:0] mem [WORDS];
  logic        rbusy, wbusy;
  logic [31:0] rptr, wptr;
  logic [8:0]  rleft, wleft;
  int unsigned stall_pct = 20;
  int unsigned rd_stalls = 0, wr_stalls = 0;
  int unsigned wlast_errors = 0;

  logic r_go, w_go, a_go;
  always_ff @(posedge clk) begin
    r_go <= ($urandom_range(99) >= stall_pct);
    w_go <= ($urandom_range(99) >= stall_pct);
    a_go <= ($urandom_range(99) >= stall_pct);
  end

  assign ar_ready = rst_n && !rbusy && a_go;
  assign r_valid  = rbusy && r_go;
  assign r_data   = mem[rptr[31:3] % WORDS];
  assign r_last   = (rleft == 9'd1);
  assign aw_ready = rst_n && !wbusy && a_go;
  assign w_ready  = wbusy && w_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbusy <= 1'b0; wbusy <= 1'b0; rptr <= '0; wptr <= '0; rleft <= '0; wleft <= '0;
    end else begin
      if (ar_valid && ar_ready) begin
        rbusy <= 1'b1; rptr <= ar_addr; rleft <= 9'(ar_len) + 9'd1;
      end
      if (r_valid && r_ready) begin
        rptr <= rptr + 32'd8; rleft <= rleft - 9'd1;
        if (rleft == 9'd1) rbusy <= 1'b0;
      end
      if (rbusy && !r_go) rd_stalls <= rd_stalls + 1;
      if (aw_valid && aw_ready) begin
        wbusy <= 1'b1; wptr <= aw_addr; wleft <= 9'(aw_len) + 9'd1;
      end
      if (w_valid && w_ready) begin
        mem[wptr[31:3] % WORDS] <= w_data;
        wptr <= wptr + 32'd8; wleft <= wleft - 9'd1;
        if ((wleft == 9'd1) != w_last) wlast_errors <= wlast_errors + 1;
        if (wleft == 9'd1) wbusy <= 1'b0;
      end
      if (wbusy && !w_go) wr_stalls <= wr_stalls + 1;
    end
  end
endmodule
