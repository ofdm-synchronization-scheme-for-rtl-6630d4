// autocorr_a: section-A auto-correlator of the burst detector.
//
// For each sample r(i) it forms the delayed conjugate product
// r(i)*conj(r(i-16)) and the energy |r(i)|^2, sums both over a 64-sample
// window (X(i) and Y(i)), and evaluates the normalised metric R(i) = |X|/Y in
// squared form, so that no square root is needed:
//   * metric  = |X|^2 * 2^TH_FRAC / 2^(2e), where 2^e is Y rounded down to a
//               power of two (e = position of the leading one of Y). The
//               division is thus a right shift, the "POT2" and "DIV" stages.
//               This approximates R^2 in TH_FRAC fractional bits (too high by
//               at most a factor 4) and is what the maximum search uses.
//               While hold_e is high (the peak search is following a peak)
//               the exponent e stays frozen, so that the metric does not
//               jump by 4 when Y crosses a power of two; the maximum of the
//               metric is then the maximum of |X|^2 over the peak.
//   * above   = |X|^2 * 2^TH_FRAC >= TH2_Q * Y^2, i.e. R >= 0.55, evaluated
//               exactly (TH2_Q is a constant, so this is a constant
//               multiplication, shifts and adds in hardware), and only when
//               Y >= MIN_E so that silence is not taken for a preamble.
// The delay, window and threshold are the design's; the energy floor MIN_E,
// the exact threshold test beside the power-of-two metric, the frozen
// exponent, and all widths
// are own choices.
//
// Interface: in_valid with in_cur = r(i), in_del = r(i-16) and the sample
// index in_idx. Four clocks later out_valid is high with out_metric,
// out_above and out_idx = in_idx. clr restarts the moving sums.
// prod_* is the registered conjugate product r(i)*conj(r(i-D)) of stage 1
// (one clock after the input). While section B is processed the delay line
// runs with D = 32, and the frequency estimator uses this product: the two
// sections share the multiplier as well as the sample memory. hold_e
// (from peak_search) acts on the metric registered at the same clock edge.
module autocorr_a
  import hsm_pkg::*;
#(
  parameter int unsigned W     = W_A,
  parameter int unsigned MW    = 16,              // metric width (saturated)
  parameter longint unsigned MIN_E = 64'd1 << 24  // energy floor on Y
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          in_valid,
  input  cplx_t         in_cur,
  input  cplx_t         in_del,
  input  idx_t          in_idx,
  input  logic          hold_e,
  output logic          out_valid,
  output logic [MW-1:0] out_metric,
  output logic          out_above,
  output idx_t          out_idx,
  // stage-1 conjugate product, shared with the frequency estimator
  output logic                     prod_valid,
  output logic signed [2*DW:0]     prod_re,
  output logic signed [2*DW:0]     prod_im,
  output idx_t                     prod_idx
);
  localparam int unsigned PW  = 2*DW + 1;            // product width
  localparam int unsigned SW  = PW + $clog2(W);      // window-sum width
  localparam int unsigned QW  = 2*SW + 1;            // squared width
  localparam int unsigned BW  = QW + TH_FRAC + 2;    // comparison width

  // ---- stage 1: conjugate product and energy
  logic                 s1_v;
  logic signed [PW-1:0] s1_pr, s1_pi, s1_e;
  idx_t                 s1_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_pr <= '0; s1_pi <= '0; s1_e <= '0; s1_idx <= '0;
    end else begin
      s1_v <= in_valid;
      if (in_valid) begin
        s1_pr  <= (PW'(in_cur.re) * PW'(in_del.re)) + (PW'(in_cur.im) * PW'(in_del.im));
        s1_pi  <= (PW'(in_cur.im) * PW'(in_del.re)) - (PW'(in_cur.re) * PW'(in_del.im));
        s1_e   <= (PW'(in_cur.re) * PW'(in_cur.re)) + (PW'(in_cur.im) * PW'(in_cur.im));
        s1_idx <= in_idx;
      end
    end
  end

  assign prod_valid = s1_v;
  assign prod_re    = s1_pr;
  assign prod_im    = s1_pi;
  assign prod_idx   = s1_idx;

  // ---- stage 2: moving sums X = Xr + jXi and Y
  logic                 s2_v, s2_vr, s2_vi, s2_ve;
  logic signed [SW-1:0] xr, xi, y;
  idx_t                 s2_idx;

  moving_sum #(.IW(PW), .W(W), .OW(SW)) u_sum_xr (
    .clk, .rst_n, .clr, .in_valid(s1_v), .in_v(s1_pr), .out_valid(s2_vr), .out_sum(xr));
  moving_sum #(.IW(PW), .W(W), .OW(SW)) u_sum_xi (
    .clk, .rst_n, .clr, .in_valid(s1_v), .in_v(s1_pi), .out_valid(s2_vi), .out_sum(xi));
  moving_sum #(.IW(PW), .W(W), .OW(SW)) u_sum_y (
    .clk, .rst_n, .clr, .in_valid(s1_v), .in_v(s1_e),  .out_valid(s2_ve), .out_sum(y));

  assign s2_v = s2_vr & s2_vi & s2_ve;              // the three sums run in step

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s2_idx <= '0;
    else if (s1_v) s2_idx <= s1_idx;
  end

  // ---- stage 3: squared magnitude, squared energy, power-of-two of Y
  logic                 s3_v;
  logic [QW-1:0]        s3_x2, s3_y2;
  logic [7:0]           s3_e;
  logic                 s3_en;
  idx_t                 s3_idx;
  logic [7:0]           lead;

  always_comb begin
    lead = '0;
    for (int unsigned b = 0; b < SW; b++) if (y[b]) lead = 8'(b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_v <= 1'b0; s3_x2 <= '0; s3_y2 <= '0; s3_e <= '0; s3_en <= 1'b0; s3_idx <= '0;
    end else begin
      s3_v <= s2_v;
      if (s2_v) begin
        s3_x2  <= QW'($unsigned(QW'(xr) * QW'(xr))) + QW'($unsigned(QW'(xi) * QW'(xi)));
        s3_y2  <= QW'($unsigned(QW'(y) * QW'(y)));
        s3_e   <= lead;
        s3_en  <= (y > 0) && (64'(y) >= MIN_E);
        s3_idx <= s2_idx;
      end
    end
  end

  // ---- stage 4: power-of-two division and threshold test
  logic [BW-1:0] x2s, quo, th_rhs;
  logic [7:0]    e_use, e_held;
  assign e_use  = hold_e ? e_held : s3_e;
  assign x2s    = BW'(s3_x2) << TH_FRAC;
  assign quo    = x2s >> (2 * e_use);
  assign th_rhs = BW'(s3_y2) * BW'(TH2_Q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_metric <= '0; out_above <= 1'b0; out_idx <= '0; e_held <= '0;
    end else begin
      out_valid <= s3_v;
      if (s3_v) begin
        e_held     <= e_use;
        out_metric <= (quo > BW'({MW{1'b1}})) ? {MW{1'b1}} : MW'(quo);
        out_above  <= s3_en && (x2s >= th_rhs);
        out_idx    <= s3_idx;
      end
    end
  end
endmodule
