// tb_autocorr_a: drives the auto-correlator with noisy random data and
// section-A preambles (current sample and the one 16 earlier), computes
// X, Y, the threshold decision R >= 0.55 and the power-of-two metric from
// the same samples in 64-bit integer and real arithmetic, and compares each
// output, and the shared conjugate product. The output must follow its input by exactly four clocks. hold_e is
// raised for stretches of samples to check that the exponent is frozen.
module tb_autocorr_a;
  import hsm_pkg::*;
  import tb_chan_pkg::*;

  localparam longint MIN_E = 64'd1 << 24;

  logic  clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0, hold_e = 1'b0;
  cplx_t in_cur = '0, in_del = '0;
  idx_t  in_idx = '0;
  logic  out_valid, out_above;
  logic [15:0] out_metric;
  idx_t  out_idx;
  logic  prod_valid;
  logic signed [2*DW:0] prod_re, prod_im;
  idx_t  prod_idx;

  autocorr_a dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_above = 0, n_hold = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { real x2; real y2; longint y; longint t; idx_t idx; } exp_t;
  exp_t expq[$];
  longint pr_h[$], pi_h[$], e_h[$];
  int e_prev = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 12) $display("FAIL: %s", s);
  endtask

  initial begin
    cr_t q[$];
    cplx_t s[$];
    int a_end, b0;
    add_qpsk(q, 300);
    add_preamble(q, 0, a_end, b0);
    add_qpsk(q, 300);
    add_preamble(q, 2, a_end, b0);
    add_qpsk(q, 200);
    foreach (q[i]) s.push_back(quant(channel(q[i], 0.03, i, 300.0)));
    for (int i = 0; i < 200; i++) s.push_back(cplx_t'($urandom & 32'h007f_007f));   // low energy
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int n = 0; n < s.size(); n++) begin
      automatic cplx_t c = s[n];
      automatic cplx_t d = (n >= int'(D_A)) ? s[n - D_A] : '0;
      automatic longint xr = 0, xi = 0, y = 0;
      automatic exp_t e;
      hold_e   = (n % 97) > 80;
      in_valid = 1'b1;
      in_cur   = c;
      in_del   = d;
      in_idx   = idx_t'(n);
      pr_h.push_back(longint'(c.re) * d.re + longint'(c.im) * d.im);
      pi_h.push_back(longint'(c.im) * d.re - longint'(c.re) * d.im);
      e_h.push_back(longint'(c.re) * c.re + longint'(c.im) * c.im);
      for (int k = 0; k < int'(W_A) && k < pr_h.size(); k++) begin
        xr += pr_h[pr_h.size() - 1 - k];
        xi += pi_h[pi_h.size() - 1 - k];
        y  += e_h[e_h.size() - 1 - k];
      end
      e.x2 = real'(xr) * real'(xr) + real'(xi) * real'(xi);
      e.y2 = real'(y) * real'(y);
      e.y  = y;
      e.t  = cyc + 4;
      e.idx = idx_t'(n);
      expq.push_back(e);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    if (expq.size() != 0) fail($sformatf("%0d outputs missing", expq.size()));
    checks++;
    if (n_above == 0 || n_hold == 0) fail("threshold or exponent hold never exercised");
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shared conjugate product, one clock after the input
  int pcount = 0;
  always @(posedge clk) begin
    #1;
    if (prod_valid) begin
      checks++;
      if (longint'(prod_re) != pr_h[pcount] || longint'(prod_im) != pi_h[pcount] || prod_idx != idx_t'(pcount))
        fail($sformatf("product %0d: (%0d,%0d) expected (%0d,%0d)", pcount, prod_re, prod_im, pr_h[pcount], pi_h[pcount]));
      pcount++;
    end
  end

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      exp_t e;
      int   lead, eu;
      real  m, th;
      bit   above;
      e = expq.pop_front();
      lead = 0;
      for (int b = 0; b < 62; b++) if (e.y >= (64'sd1 <<< b)) lead = b;
      eu = hold_e ? e_prev : lead;
      if (hold_e) n_hold++;
      e_prev = eu;
      m = e.x2 * 1024.0 / (2.0 ** (2 * eu));
      if (m > 65535.0) m = 65535.0;
      th = e.x2 * 1024.0 - 310.0 * e.y2;
      above = (e.y >= MIN_E) && (th >= 0.0);
      if (out_above) n_above++;
      checks++;
      if (cyc != e.t) fail($sformatf("idx %0d: output after %0d clocks, expected 4", e.idx, cyc - e.t + 4));
      checks++;
      if (out_idx != e.idx) fail($sformatf("index %0d expected %0d", out_idx, e.idx));
      checks++;
      if (real'(out_metric) > m + 1.0 || real'(out_metric) < m - 1.0)
        fail($sformatf("idx %0d metric %0d expected %f", e.idx, out_metric, m));
      checks++;
      if (out_above != above && (th > 1.0e-9 * e.x2 * 1024.0 || th < -1.0e-9 * e.x2 * 1024.0))
        fail($sformatf("idx %0d above %0d expected %0d", e.idx, out_above, above));
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
