// tb_freq_est: the products r(n)*conj(r(n-32)) of a section B sent with frequency offsets spread over the whole
// range the 32-sample delay can resolve (|w| < pi/32), first without, then
// with noise. The estimate dphi must match the applied offset (2e-5 and
// 1e-3 rad/sample), angle must be 32 times it, and done must come within
// ITER + 8 clocks of the last sample used (t0 + 127).
module tb_freq_est;
  import hsm_pkg::*;
  import tb_chan_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  idx_t  t0 = '0, in_idx = '0;
  logic signed [2*DW:0] in_re = '0, in_im = '0;
  logic  done, busy;
  ang_t  dphi, angle;

  freq_est dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_done = 0, done_at = 0;
  ang_t d_dphi, d_angle;
  always @(posedge clk) begin
    #1;
    if (done) begin n_done++; done_at = int'(cyc); d_dphi = dphi; d_angle = angle; end
  end

  task automatic fail(input string s);
    failures++;
    if (failures < 12) $display("FAIL: %s", s);
  endtask

  initial begin
    int base = 500;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 24; t++) begin
      cr_t   q[$];
      cplx_t s[$];
      int    b0, last_cyc;
      real   w, sigma, tol, err, aerr;
      w     = (real'(t % 12) - 5.5) / 6.0 * 0.95 * PI / real'(D_B);
      sigma = (t < 12) ? 0.0 : real'(AMP) / 10.0;
      tol   = (t < 12) ? 2.0e-5 : 1.0e-3;
      q.delete(); s.delete();
      add_qpsk(q, 40);
      b0 = base + q.size();
      for (int f = 0; f < int'(B_NUM); f++)
        for (int k = 0; k < int'(B_LEN); k++) q.push_back(from_cplx(b_field(k)));
      add_qpsk(q, 20);
      foreach (q[i]) s.push_back(quant(channel(q[i], w, i, sigma)));
      @(negedge clk);
      start = 1'b1;
      t0    = idx_t'(b0);
      @(negedge clk);
      start = 1'b0;
      last_cyc = 0;
      for (int n = 0; n < s.size(); n++) begin
        automatic cplx_t c = s[n];
        automatic cplx_t d = (n >= int'(D_B)) ? s[n - D_B] : '0;
        in_valid = 1'b1;
        in_re    = (2*DW+1)'(longint'(c.re) * d.re + longint'(c.im) * d.im);
        in_im    = (2*DW+1)'(longint'(c.im) * d.re - longint'(c.re) * d.im);
        in_idx   = idx_t'(base + n);
        if (base + n == b0 + 127) last_cyc = int'(cyc);
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (30) @(negedge clk);
      err  = wrap(ang2rad(d_dphi) - w);
      aerr = wrap(ang2rad(d_angle) - 32.0 * w);
      checks += 4;
      if (n_done != 1) fail($sformatf("w=%f: done %0d times", w, n_done));
      if (err > tol || err < -tol) fail($sformatf("w=%f: estimate %f", w, ang2rad(d_dphi)));
      if (aerr > 32.0 * tol || aerr < -32.0 * tol) fail($sformatf("w=%f: angle %f", w, ang2rad(d_angle)));
      if (done_at - last_cyc > 18 + 8) fail($sformatf("w=%f: done %0d clocks after last sample", w, done_at - last_cyc));
      n_done = 0;
      base += s.size() + 50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
