// qam_decision: gain, decoding table and error of one equalized tone.
//
// The equalized tone xh is in normalized units (XF fraction bits; QPSK points
// at +-1 +-j), every constellation having the QPSK average energy. For b bits
// per tone the block multiplies by Gain(b) = sqrt(E(b)/2), which puts the point
// on the odd-integer grid of a rectangular QAM with ceil(b/2) bits on I and
// floor(b/2) bits on Q (E(b) = the grid's mean energy,
// E(b) = ((4**bi - 1) + (4**bq - 1)) / 3). Each axis is sliced to the nearest
// odd level, and the level index is the demapped bits (I bits in the low part
// of bits, Q bits above). The error e = decided - xh, both normalized, drives
// LMS adaptation. b = 0 (unused tone) gives no bits and no error.
// The gain / decoding-table structure follows the design; the rectangular
// constellations, natural binary labelling and formats are this
// implementation's. Purely combinational.
module qam_decision
  import vdsl_pkg::*;
(
  input  logic signed [XW-1:0] xh_re,
  input  logic signed [XW-1:0] xh_im,
  input  logic [BITS_W-1:0]    nbits,
  output logic [DEMAP_W-1:0]   bits,
  output logic signed [XW-1:0] dec_re,   // decided point, normalized
  output logic signed [XW-1:0] dec_im,
  output logic signed [XW-1:0] err_re,
  output logic signed [XW-1:0] err_im
);
  localparam int unsigned GAIN_F = 10;   // fraction bits of Gain(b)
  localparam int unsigned INV_S  = 8;    // extra precision of 1/Gain(b)
  localparam int unsigned TW     = 32;

  function automatic logic [16*TW-1:0] make_gain_tab();
    logic [16*TW-1:0] t;
    t = '0;
    for (int b = 1; b < 16; b++) begin
      longint unsigned e3, v;
      e3 = ((64'd1 << (2*bits_i(b))) - 1) + ((64'd1 << (2*bits_q(b))) - 1);
      v  = (e3 << (2*GAIN_F)) / 6;          // E(b)/2 * 2**(2*GAIN_F)
      t[b*TW +: TW] = TW'(isqrt(v));
    end
    return t;
  endfunction

  function automatic logic [16*TW-1:0] make_inv_tab();
    logic [16*TW-1:0] t, g;
    g = make_gain_tab();
    t = '0;
    for (int b = 1; b < 16; b++)
      t[b*TW +: TW] = TW'((64'd1 << (XF + GAIN_F + INV_S)) / longint'(g[b*TW +: TW]));
    return t;
  endfunction

  localparam logic [16*TW-1:0] GAIN_TAB = make_gain_tab();
  localparam logic [16*TW-1:0] INV_TAB  = make_inv_tab();

  logic signed [TW:0]   gain, inv;
  logic [3:0]           mi, mq;

  // Slice one axis: xg has GAIN_F fraction bits, m bits on the axis.
  function automatic void slice(input logic signed [63:0] xg, input logic [3:0] m,
                                output logic [7:0] idx, output logic signed [15:0] lvl);
    logic signed [63:0] t, top;
    if (m == 0) begin
      idx = '0;
      lvl = '0;
    end else begin
      top = (64'sd1 <<< m) - 1;
      t   = (xg + ((top + 1) <<< GAIN_F)) >>> (GAIN_F + 1);   // nearest level
      if (t < 0)        t = 0;
      else if (t > top) t = top;
      idx = 8'(t);
      lvl = 16'(2 * t - top);
    end
  endfunction

  always_comb begin
    logic signed [63:0] xg_re, xg_im, dn_re, dn_im;
    logic [7:0]         idx_i, idx_q;
    logic signed [15:0] lvl_i, lvl_q;
    mi    = 4'(bits_i(int'(nbits)));
    mq    = 4'(bits_q(int'(nbits)));
    gain  = {1'b0, GAIN_TAB[nbits*TW +: TW]};
    inv   = {1'b0, INV_TAB[nbits*TW +: TW]};
    xg_re = (64'(xh_re) * 64'(gain)) >>> XF;
    xg_im = (64'(xh_im) * 64'(gain)) >>> XF;
    slice(xg_re, mi, idx_i, lvl_i);
    slice(xg_im, mq, idx_q, lvl_q);
    bits  = DEMAP_W'((64'(idx_q) << mi) | 64'(idx_i));
    dn_re = (64'(lvl_i) * 64'(inv)) >>> INV_S;
    dn_im = (64'(lvl_q) * 64'(inv)) >>> INV_S;
    dec_re = XW'(dn_re);
    dec_im = XW'(dn_im);
    if (nbits == '0) begin
      err_re = '0;
      err_im = '0;
    end else begin
      err_re = XW'(dn_re - 64'(xh_re));
      err_im = XW'(dn_im - 64'(xh_im));
    end
  end
endmodule
