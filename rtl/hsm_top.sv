// hsm_top: OFDM burst synchroniser for power-line modems (the "Hypersynch
// Module"). It finds the preamble of a burst, fixes the symbol timing to the
// sample and removes the carrier-frequency deviation from the samples.
//
// Data flow. Every received base-band sample enters the shared delay line,
// which returns it with the sample 16 (section A) or 32 (section B) samples
// older. During the search the auto-correlator (autocorr_a) and the peak
// search find the end of the repeated A fields (coarse timing, +/-4
// samples). The controller (fsm_sincro) then predicts the start t0 of
// section B and starts, in parallel, the matched-filter bank (fine_timing),
// which corrects t0 to the exact start of section B, and the frequency
// estimator (freq_est), which measures the phase turn over 32 samples using
// the auto-correlator's conjugate multiplier (the delay line now runs at 32). The
// estimate drives the frequency corrector, through which all samples leave
// the module; the first sample of section C (channel estimation) is marked
// with out_sof.
//
// Interface: in_valid/in_s, one complex sample per clock at most (16-bit
// I/Q). restart (one clock) ends a lock and starts a new search. Outputs:
// detect pulses when a preamble is found (coarse_idx = index of the
// auto-correlation peak, counted from reset, coarse_metric its
// normalised value, 1024 for a perfect match); fine_done pulses with
// fine_offset and b_start (index of the first section-B sample);
// freq_valid is high once dphi (phase step per sample, 2^20 per turn) is
// known; locked is high after both. out_* is the corrected stream, LAT =
// 19 clocks after the sample enters; out_sof marks sample b_start + 128.
// Sample indices count samples from reset and wrap at 2^32.
module hsm_top
  import hsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic        in_valid,
  input  cplx_t       in_s,
  output logic        out_valid,
  output cplx_t       out_s,
  output logic        out_sof,
  output logic        detect,
  output idx_t        coarse_idx,
  output logic [15:0] coarse_metric,
  output logic        fine_done,
  output logic signed [3:0] fine_offset,
  output idx_t        b_start,
  output logic        freq_valid,
  output ang_t        dphi,
  output logic        locked,
  output logic        searching
);
  localparam int unsigned MW = 16;

  // ---- shared delay line and sample index
  logic  sel_b, dl_valid;
  cplx_t dl_cur, dl_del;
  idx_t  n_idx;

  delay_line u_delay (
    .clk, .rst_n, .in_valid, .in_s, .sel_b,
    .out_valid(dl_valid), .out_cur(dl_cur), .out_del(dl_del));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        n_idx <= '0;
    else if (dl_valid) n_idx <= n_idx + 1'b1;
  end

  // ---- section A: auto-correlator and peak search
  logic          clr, arm;
  logic          m_valid, m_above;
  logic [MW-1:0] m_metric;
  idx_t          m_idx, peak_idx;
  logic          found, hold_e;
  logic          p_valid;
  logic signed [2*DW:0] p_re, p_im;
  idx_t          p_idx;

  autocorr_a #(.MW(MW)) u_autocorr (
    .clk, .rst_n, .clr,
    .in_valid(dl_valid), .in_cur(dl_cur), .in_del(dl_del), .in_idx(n_idx), .hold_e,
    .out_valid(m_valid), .out_metric(m_metric), .out_above(m_above), .out_idx(m_idx),
    .prod_valid(p_valid), .prod_re(p_re), .prod_im(p_im), .prod_idx(p_idx));

  peak_search #(.MW(MW)) u_peak (
    .clk, .rst_n, .arm,
    .m_valid, .m_metric, .m_above, .m_idx,
    .hold_e, .found, .peak_idx, .peak_metric(coarse_metric));

  // ---- control
  logic b_go, freq_done;
  idx_t t0;

  fsm_sincro u_fsm (
    .clk, .rst_n, .restart, .in_valid(dl_valid),
    .found, .peak_idx, .fine_done, .freq_done,
    .sel_b, .arm, .clr, .b_go, .t0, .locked, .searching);

  // ---- section B: fine timing and frequency estimation
  fine_timing u_fine (
    .clk, .rst_n, .start(b_go), .t0,
    .in_valid(dl_valid), .in_cur(dl_cur), .in_idx(n_idx),
    .done(fine_done), .offset(fine_offset), .b_start, .busy());

  ang_t f_dphi;
  freq_est u_freq (
    .clk, .rst_n, .start(b_go), .t0,
    .in_valid(p_valid), .in_re(p_re), .in_im(p_im), .in_idx(p_idx),
    .done(freq_done), .dphi(f_dphi), .angle(), .busy());

  // ---- results held for the outputs
  idx_t sof_idx;
  logic sof_armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse_idx <= '0; freq_valid <= 1'b0; dphi <= '0; sof_idx <= '0; sof_armed <= 1'b0;
    end else begin
      if (found) coarse_idx <= peak_idx;
      if (restart) begin
        freq_valid <= 1'b0;
        sof_armed  <= 1'b0;
      end else begin
        if (freq_done) begin
          freq_valid <= 1'b1;
          dphi       <= f_dphi;
        end
        if (fine_done) begin
          sof_idx   <= b_start + idx_t'(B_NUM * B_LEN);
          sof_armed <= 1'b1;
        end else if (dl_valid && sof_armed && n_idx == sof_idx) begin
          sof_armed <= 1'b0;
        end
      end
    end
  end

  assign detect = found;

  // ---- frequency correction of the outgoing stream
  freq_corrector u_corr (
    .clk, .rst_n, .enable(freq_valid), .dphi,
    .in_valid(dl_valid), .in_s(dl_cur), .in_flag(sof_armed && n_idx == sof_idx),
    .out_valid, .out_s, .out_flag(out_sof));
endmodule
