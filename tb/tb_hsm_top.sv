// tb_hsm_top: end-to-end test of the synchroniser at its default sizes.
//
// Several bursts are sent back to back, each made of data-like filler, the
// preamble (sections A and B), a 160-sample section C and more data. Every
// burst gets its own frequency offset, additive noise (20 dB SNR) and a
// shift of section B against section A (gap, -4..+4 samples) that the fine
// timing has to find. Some bursts arrive with idle clocks between samples.
// Between bursts the synchroniser is restarted.
// Checked per burst, against values computed here from the stimulus: one
// detection, the coarse peak within one sample of the end of the A fields,
// the exact start of section B, the reported offset, the frequency estimate,
// the position of the section-C marker on the output, and that the phase of
// the corrected output no longer drifts (by more than the 2e-3 rad/sample estimate tolerance
// allows over 168 samples). Each mechanism (detection, a
// non-zero fine correction, frequency correction, restart, input stalls)
// must occur at least once.
module tb_hsm_top;
  import hsm_pkg::*;
  import tb_chan_pkg::*;

  localparam int NB    = 6;
  localparam int C_LEN = 160;
  localparam int LEAD  = 150;                  // filler before each preamble (>= blank time)

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  restart = 1'b0;
  logic  in_valid = 1'b0;
  cplx_t in_s = '0;
  logic  out_valid, out_sof, detect, fine_done, freq_valid, locked, searching;
  cplx_t out_s;
  idx_t  coarse_idx, b_start;
  logic [15:0] coarse_metric;
  logic signed [3:0] fine_offset;
  ang_t  dphi;

  hsm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- stimulus
  cplx_t stim[$];
  cr_t   orig[$];
  int    a_end_q[NB], b0_q[NB], gap_q[NB], start_q[NB];
  real   w_q[NB];

  initial begin
    automatic int gaps[NB] = '{0, 3, -2, -4, 4, 1};
    for (int b = 0; b < NB; b++) begin
      cr_t q[$];
      int a_end, b0, base;
      q.delete();
      base       = stim.size();
      start_q[b] = base;
      gap_q[b]   = gaps[b];
      w_q[b]     = (urand() * 2.0 - 1.0) * 0.8 * PI / real'(D_B);
      add_qpsk(q, LEAD + int'($urandom_range(0, 40)));
      add_preamble(q, gap_q[b], a_end, b0);
      add_qpsk(q, C_LEN + 200);
      a_end_q[b] = base + a_end;
      b0_q[b]    = base + b0;
      foreach (q[i]) begin
        orig.push_back(q[i]);
        stim.push_back(quant(channel(q[i], w_q[b], i, real'(AMP) / 10.0)));
      end
    end
  end

  // ---- driver
  int burst_of_sample = 0;
  int n_stalls = 0, n_restarts = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < stim.size(); i++) begin
      automatic int b = 0;
      for (int k = 0; k < NB; k++) if (i >= start_q[k]) b = k;
      if (b > 0 && i == start_q[b]) begin
        restart  <= 1'b1;
        in_valid <= 1'b0;
        n_restarts++;
        @(posedge clk);
        restart <= 1'b0;
      end
      if (b % 2 == 1)
        while ($urandom_range(0, 3) == 0) begin    // idle clocks between samples
          in_valid <= 1'b0;
          n_stalls++;
          @(posedge clk);
        end
      in_valid <= 1'b1;
      in_s     <= stim[i];
      burst_of_sample = b;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (60) @(posedge clk);
    finish_test();
  end

  // ---- monitors
  int   n_detect[NB];
  int   n_fine[NB];
  int   n_sof[NB];
  int   n_nonzero_fix = 0, n_freq = 0;
  int   out_n = 0;
  int   cur_b;
  real  ph_first[NB], ph_last[NB];
  int   ph_cnt_first[NB], ph_cnt_last[NB];
  real  ph_sum_first_re[NB], ph_sum_first_im[NB], ph_sum_last_re[NB], ph_sum_last_im[NB];
  logic freq_valid_d = 1'b0;
  logic detect_d = 1'b0;

  function automatic int burst_of(input int idx);
    int b = 0;
    for (int k = 0; k < NB; k++) if (idx >= start_q[k]) b = k;
    return b;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      freq_valid_d <= freq_valid;
      detect_d <= detect;
      if (detect_d) begin                       // coarse_idx is updated with the pulse
        automatic int b = burst_of(int'(coarse_idx));
        n_detect[b]++;
        check(int'(coarse_idx) >= a_end_q[b] - 1 && int'(coarse_idx) <= a_end_q[b] + 1,
              $sformatf("burst %0d coarse peak %0d, A fields end at %0d", b, coarse_idx, a_end_q[b]));
      end
      if (fine_done) begin
        automatic int b = burst_of(int'(b_start));
        n_fine[b]++;
        check(int'(b_start) == b0_q[b],
              $sformatf("burst %0d section B found at %0d, expected %0d", b, b_start, b0_q[b]));
        check(int'(b_start) - int'(fine_offset) == int'(coarse_idx) + int'(A_LEN) + 1,
              $sformatf("burst %0d offset %0d does not match coarse %0d", b, fine_offset, coarse_idx));
        if (fine_offset != 0) n_nonzero_fix++;
      end
      if (freq_valid && !freq_valid_d) begin
        real err;
        cur_b = burst_of_sample;
        err = wrap(ang2rad(dphi) - w_q[cur_b]);
        n_freq++;
        check(err < 2.0e-3 && err > -2.0e-3,
              $sformatf("burst %0d frequency %f rad/sample, applied %f", cur_b, ang2rad(dphi), w_q[cur_b]));
      end
      if (out_valid) begin
        automatic int b  = burst_of(out_n);
        automatic int c0 = b0_q[b] + int'(B_NUM * B_LEN);
        if (out_sof) begin
          n_sof[b]++;
          check(out_n == c0, $sformatf("burst %0d section C marked at %0d, expected %0d", b, out_n, c0));
        end
        // phase of corrected output against the transmitted sample
        if (freq_valid && out_n >= c0 + 40 && out_n < c0 + 40 + 200) begin
          automatic real pr = real'(out_s.re) * orig[out_n].re + real'(out_s.im) * orig[out_n].im;
          automatic real pi_ = real'(out_s.im) * orig[out_n].re - real'(out_s.re) * orig[out_n].im;
          if (out_n < c0 + 40 + 32) begin
            ph_sum_first_re[b] += pr; ph_sum_first_im[b] += pi_; ph_cnt_first[b]++;
          end
          if (out_n >= c0 + 40 + 200 - 32) begin
            ph_sum_last_re[b] += pr; ph_sum_last_im[b] += pi_; ph_cnt_last[b]++;
          end
        end
        out_n++;
      end
    end
  end

  task automatic finish_test();
    for (int b = 0; b < NB; b++) begin
      real drift;
      check(n_detect[b] == 1, $sformatf("burst %0d detected %0d times", b, n_detect[b]));
      check(n_fine[b] == 1, $sformatf("burst %0d fine timing reported %0d times", b, n_fine[b]));
      check(n_sof[b] == 1, $sformatf("burst %0d section C marked %0d times", b, n_sof[b]));
      check(ph_cnt_first[b] == 32 && ph_cnt_last[b] == 32,
            $sformatf("burst %0d corrected samples compared: %0d/%0d", b, ph_cnt_first[b], ph_cnt_last[b]));
      drift = wrap(cang(ph_sum_last_re[b], ph_sum_last_im[b]) - cang(ph_sum_first_re[b], ph_sum_first_im[b]));
      check(drift < 0.35 && drift > -0.35,
            $sformatf("burst %0d residual phase drift %f rad over 168 samples (uncorrected %f)",
                      b, drift, wrap(w_q[b] * 168.0)));
    end
    $display("mechanisms: detections=%0d nonzero_fine_corrections=%0d freq_corrections=%0d restarts=%0d input_stalls=%0d",
             n_detect.sum(), n_nonzero_fix, n_freq, n_restarts, n_stalls);
    check(n_detect.sum() > 0, "no preamble detection happened");
    check(n_nonzero_fix > 0, "no non-zero fine timing correction happened");
    check(n_freq > 0, "no frequency correction happened");
    check(n_restarts > 0, "no restart happened");
    check(n_stalls > 0, "no input stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
