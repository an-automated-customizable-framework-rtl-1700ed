// tb_ref_pkg: reference arithmetic for the testbenches.
//
// Plain integer models of what the accelerator computes, written from the
// formulas in the RTL headers rather than from the RTL: convolution of an
// unsigned 8-bit feature map (zero point z1) with signed 8-bit weights,
// requantization with Leaky ReLU, and Q16.16 rescaling for concat/add.
// The arrays below are shared scratch storage that a testbench fills.
package tb_ref_pkg;

  localparam int MAXC = 32;
  localparam int MAXH = 16;

  byte unsigned fm   [MAXC][MAXH][MAXH];   // [channel][row][col]
  byte signed   wt   [MAXC][MAXC][3][3];   // [out][in][ky][kx]
  int           bias [MAXC];
  int unsigned  mult [MAXC];
  int unsigned  shft [MAXC];

  function automatic int unsigned clamp8(longint v);
    if (v < 0) return 0;
    if (v > 255) return 255;
    return int'(v);
  endfunction

  function automatic int unsigned quant_ref(longint acc, int b, int unsigned m, int unsigned sh,
                                            int amend, int unsigned z3, bit act,
                                            bit leaky = 1'b1);
    longint y, r;
    y = (acc + longint'(b)) * longint'(m) + longint'(amend);
    if (act && y < 0) y = leaky ? (y * 13) >>> 7 : 0;
    r = (sh == 0) ? y : ((y + (longint'(1) << (sh - 1))) >>> sh);
    return clamp8(r + longint'(z3));
  endfunction

  // Accumulator of output channel o at output pixel (oh, ow).
  function automatic longint conv_acc(int o, int oh, int ow, int cin, int h, int w,
                                      int k, int pad, int str, int z1);
    longint s = 0;
    for (int ky = 0; ky < k; ky++)
      for (int kx = 0; kx < k; kx++) begin
        int ih = oh * str + ky - pad;
        int iw = ow * str + kx - pad;
        if (ih < 0 || iw < 0 || ih >= h || iw >= w) continue;
        for (int c = 0; c < cin; c++)
          s += longint'(int'(fm[c][ih][iw]) - z1) * longint'(wt[o][c][ky][kx]);
      end
    return s;
  endfunction

  function automatic int unsigned conv_out(int o, int oh, int ow, int cin, int h, int w,
                                           int k, int pad, int str, int z1, int amend,
                                           int unsigned z3, bit act);
    return quant_ref(conv_acc(o, oh, ow, cin, h, w, k, pad, str, z1),
                     bias[o], mult[o], shft[o], amend, z3, act);
  endfunction

  // Requantize one value from (z, s) to output zero point zo, Q16.16 scale.
  function automatic longint rescale(int unsigned x, int unsigned z, int unsigned s);
    return longint'(int'(x) - int'(z)) * longint'(s);
  endfunction

  function automatic int unsigned ref_round_q16(longint p, int unsigned zo);
    return clamp8(((p + 32768) >>> 16) + longint'(zo));
  endfunction

  // Words of a conv layer's input stream: quantization, weight and feature words.
  function automatic longint unsigned qparam_word(int o);
    return {10'd0, shft[o][5:0], mult[o][15:0], bias[o]};
  endfunction

  function automatic longint unsigned weight_word(int og, int ky, int kx, int ig, int ol);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[i*8 +: 8] = wt[og*8 + ol][ig*8 + i][ky][kx];
    return v;
  endfunction

  function automatic longint unsigned feature_word(int cg, int r, int c);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[i*8 +: 8] = fm[cg*8 + i][r][c];
    return v;
  endfunction

endpackage
