// tb_chan_pkg: stimulus helpers shared by the testbenches: burst and
// preamble construction, a frequency offset, additive noise and rounding to
// the 16-bit sample format. All arithmetic is in real numbers, independent of
// the fixed-point design.
package tb_chan_pkg;
  import hsm_pkg::*;

  typedef struct {
    real re;
    real im;
  } cr_t;

  localparam real PI = 3.14159265358979323846;

  function automatic real urand();                    // uniform in [0,1)
    return real'($urandom) / 4294967296.0;
  endfunction

  function automatic real gauss();                    // approx. N(0,1)
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += urand();
    return s - 6.0;
  endfunction

  function automatic cr_t from_cplx(input cplx_t c);
    cr_t r;
    r.re = real'(c.re);
    r.im = real'(c.im);
    return r;
  endfunction

  // random QPSK samples at the preamble amplitude (data-like filler)
  function automatic void add_qpsk(ref cr_t q[$], input int n);
    for (int i = 0; i < n; i++) begin
      cr_t c;
      c.re = (($urandom & 1) != 0) ? real'(AMP) : -real'(AMP);
      c.im = (($urandom & 1) != 0) ? real'(AMP) : -real'(AMP);
      q.push_back(c);
    end
  endfunction

  // preamble sections A and B. gap > 0 inserts gap filler samples before
  // section B, gap < 0 drops -gap samples of the -A field, which shifts
  // section B against the coarse timing. Returns the index of the last
  // sample of the fifth A field and of the first sample of section B.
  function automatic void add_preamble(ref cr_t q[$], input int gap,
                                       output int a_end, output int b0);
    for (int f = 0; f < int'(A_NUM); f++)
      for (int k = 0; k < int'(A_LEN); k++) q.push_back(from_cplx(a_field(k)));
    a_end = q.size() - 1;
    for (int k = 0; k < int'(A_LEN) + ((gap < 0) ? gap : 0); k++) begin
      cr_t c = from_cplx(a_field(k));
      c.re = -c.re; c.im = -c.im;
      q.push_back(c);
    end
    if (gap > 0) add_qpsk(q, gap);
    b0 = q.size();
    for (int f = 0; f < int'(B_NUM); f++)
      for (int k = 0; k < int'(B_LEN); k++) q.push_back(from_cplx(b_field(k)));
  endfunction

  // channel: rotate sample n by w*n (rad), add noise of std sigma per rail
  function automatic cr_t channel(input cr_t c, input real w, input int n,
                                  input real sigma);
    cr_t r;
    real cs = $cos(w * n), sn = $sin(w * n);
    r.re = c.re * cs - c.im * sn + sigma * gauss();
    r.im = c.re * sn + c.im * cs + sigma * gauss();
    return r;
  endfunction

  function automatic samp_t q16(input real v);
    real  r = (v >= 0.0) ? v + 0.5 : v - 0.5;
    if (r >  32767.0) r =  32767.0;
    if (r < -32768.0) r = -32768.0;
    return samp_t'($rtoi(r));
  endfunction

  function automatic cplx_t quant(input cr_t c);
    cplx_t o;
    o.re = q16(c.re);
    o.im = q16(c.im);
    return o;
  endfunction

  // angle of a complex number, and wrap into (-pi, pi]
  function automatic real cang(input real re, input real im);
    return $atan2(im, re);
  endfunction

  function automatic real wrap(input real a);
    real r = a;
    while (r >  PI) r -= 2.0 * PI;
    while (r <= -PI) r += 2.0 * PI;
    return r;
  endfunction

  // binary angle (2^ANG_W per turn) to radians
  function automatic real ang2rad(input ang_t a);
    return real'(a) * 2.0 * PI / real'(64'd1 << ANG_W);
  endfunction
endpackage
