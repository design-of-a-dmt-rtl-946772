// tb_qam_decision: for every bit count 1..15 builds random constellation
// points from an independent real-valued model (odd-integer grid scaled by
// 1/sqrt(E/2)), adds noise below half a grid step (and occasionally pushes
// a point beyond the outer ring) and checks the demapped bits and the error
// decided - xh. b = 0 must give no bits and no error.
module tb_qam_decision;
  import vdsl_pkg::*;
  logic signed [XW-1:0] xh_re = '0, xh_im = '0, dec_re, dec_im, err_re, err_im;
  logic [BITS_W-1:0] nbits = '0;
  logic [DEMAP_W-1:0] bits;
  int checks = 0, failures = 0;

  qam_decision dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    for (int b = 0; b < 16; b++) begin
      int mi, mq, li, lq;
      real e, g, pr, pi_, nr, ni, xr, xi, er, ei;
      mi = (b + 1) / 2; mq = b / 2;
      e = ((4.0 ** mi - 1.0) + (4.0 ** mq - 1.0)) / 3.0;
      g = (b == 0) ? 1.0 : $sqrt(e / 2.0);
      for (int t = 0; t < 200; t++) begin
        int ii, iq, expbits, oi, oq, ri, rq;
        ii = (mi == 0) ? 0 : $urandom_range(0, (1 << mi) - 1);
        iq = (mq == 0) ? 0 : $urandom_range(0, (1 << mq) - 1);
        li = (mi == 0) ? 0 : 2 * ii - ((1 << mi) - 1);
        lq = (mq == 0) ? 0 : 2 * iq - ((1 << mq) - 1);
        // noise up to 0.4 grid steps; every 10th point pushed outward
        ri = $urandom_range(0, 800); rq = $urandom_range(0, 800);
        nr = (ri - 400) / 1000.0;
        ni = (mq == 0) ? 0.0 : (rq - 400) / 1000.0;
        oi = 0; oq = 0;
        if (t % 10 == 0 && mi > 0 && (ii == 0 || ii == (1 << mi) - 1)) nr = (ii == 0) ? -2.0 : 2.0;
        xr = (li + nr) / g * 4096.0;
        xi = (lq + ni) / g * 4096.0;
        xh_re = XW'(int'(xr)); xh_im = XW'(int'(xi));
        nbits = BITS_W'(b);
        #1;
        expbits = (b == 0) ? 0 : ((iq << mi) | ii);
        er = (b == 0) ? 0.0 : li / g * 4096.0 - real'(int'(xr));
        ei = (b == 0) ? 0.0 : lq / g * 4096.0 - real'(int'(xi));
        checks++;
        if (int'(bits) != expbits) begin
          failures++; $display("b=%0d t=%0d bits=%0d exp=%0d", b, t, bits, expbits);
        end
        checks++;
        if (fabs(real'(err_re) - er) > 3.0 + 0.002 * fabs(er) ||
            fabs(real'(err_im) - ei) > 3.0 + 0.002 * fabs(ei)) begin
          failures++; $display("b=%0d err=(%0d,%0d) exp=(%f,%f)", b, err_re, err_im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
