// fine_timing: bank of nine matched filters on preamble section B, with a
// comparator that picks the timing correction.
//
// The coarse timing gives t0, the expected first sample of section B, within
// +/-MAX_ERR samples. Hypothesis h (0..N_HYP-1) assumes section B really
// starts at t0 + e with e = h - MAX_ERR. Its matched filter correlates 32
// received samples with the conjugated B field, aligned for that start:
//   acc[h] = sum r(n) * conj(c[(n - t0 - e) mod 32])
// Because section B repeats the same 32-sample field four times, each
// hypothesis may use any 32 consecutive samples of it. The hypotheses are
// therefore spread over time: in window m (m = 0,1,2, samples
// t0+4+32m .. t0+35+32m) multiplier j serves hypothesis h = 3m + j. So three
// complex multiplications and three accumulations per sample cover all nine
// filters, instead of a 32-tap correlator running on every sample. After the
// last window the comparator scans the nine accumulators one a clock, using
// squared magnitudes (no square root), and reports the largest.
// The nine hypotheses, the three multipliers per sample and the 32-entry
// coefficient memory are the design's; the window placement, the serial
// comparator and the coefficient values (hsm_pkg::b_field) are own choices.
//
// Interface: start (one clock) loads t0. The sample stream in_valid/in_cur/
// in_idx is the delayed-line output, indexed like t0. About N_HYP+3 clocks
// after sample t0+99, done pulses with offset (signed, -4..+4) and b_start =
// t0 + offset. The samples used must lie after start.
module fine_timing
  import hsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  idx_t        t0,
  input  logic        in_valid,
  input  cplx_t       in_cur,
  input  idx_t        in_idx,
  output logic        done,
  output logic signed [3:0] offset,
  output idx_t        b_start,
  output logic        busy
);
  localparam int unsigned PW = 2*DW + 1;
  localparam int unsigned AW = PW + $clog2(B_LEN) + 1;   // accumulator width
  localparam int unsigned QW = 2*AW + 1;
  localparam int unsigned LO = MAX_ERR;                  // first sample used
  localparam int unsigned HI = MAX_ERR + (N_HYP / N_MULT) * B_LEN;
  localparam int unsigned KW = $clog2(B_LEN);

  typedef logic [B_LEN-1:0][$bits(cplx_t)-1:0] coef_arr_t;
  function automatic coef_arr_t make_coef();
    coef_arr_t c;
    for (int unsigned k = 0; k < B_LEN; k++) c[k] = b_field(k);
    return c;
  endfunction
  localparam coef_arr_t COEF = make_coef();               // coefficient memory

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_CMP, S_OUT} state_t;
  state_t state;

  idx_t                     t0_r;
  idx_t                     rel;
  logic signed [AW-1:0]     acc_re [N_HYP];
  logic signed [AW-1:0]     acc_im [N_HYP];

  // stage 1: three products, registered with their hypothesis number
  logic                     p_v;
  logic [3:0]               p_h  [N_MULT];
  logic signed [PW-1:0]     p_re [N_MULT];
  logic signed [PW-1:0]     p_im [N_MULT];
  logic                     last_seen;

  assign rel = in_idx - t0_r;

  // hypothesis and coefficient address of each multiplier for this sample:
  // h = 3m + j, k = (rel - e) mod 32 with e = h - MAX_ERR
  logic [3:0]    m_h [N_MULT];
  cplx_t         m_c [N_MULT];
  logic          in_win;

  assign in_win = (state == S_ACC) && in_valid && rel >= idx_t'(LO) && rel < idx_t'(HI);

  always_comb begin
    for (int j = 0; j < N_MULT; j++) begin
      m_h[j] = 4'((rel - idx_t'(LO)) >> KW) * 4'(N_MULT) + 4'(j);
      m_c[j] = COEF[KW'(rel + idx_t'(MAX_ERR) - idx_t'(m_h[j]))];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_v <= 1'b0;
      for (int j = 0; j < N_MULT; j++) begin p_h[j] <= '0; p_re[j] <= '0; p_im[j] <= '0; end
    end else begin
      p_v <= in_win;
      if (in_win)
        for (int j = 0; j < N_MULT; j++) begin
          p_h[j]  <= m_h[j];
          p_re[j] <= (PW'(in_cur.re) * PW'(m_c[j].re)) + (PW'(in_cur.im) * PW'(m_c[j].im));
          p_im[j] <= (PW'(in_cur.im) * PW'(m_c[j].re)) - (PW'(in_cur.re) * PW'(m_c[j].im));
        end
    end
  end

  // stage 2: accumulators, then serial comparator
  logic [3:0]           cmp_h;
  logic [3:0]           best_h;
  logic [QW-1:0]        best_q;
  logic [QW-1:0]        cur_q;

  assign cur_q = QW'($unsigned(QW'(acc_re[cmp_h]) * QW'(acc_re[cmp_h])))
               + QW'($unsigned(QW'(acc_im[cmp_h]) * QW'(acc_im[cmp_h])));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; t0_r <= '0; done <= 1'b0; offset <= '0; b_start <= '0;
      cmp_h <= '0; best_h <= '0; best_q <= '0; last_seen <= 1'b0;
      for (int h = 0; h < N_HYP; h++) begin acc_re[h] <= '0; acc_im[h] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          t0_r      <= t0;
          last_seen <= 1'b0;
          state     <= S_ACC;
          for (int h = 0; h < N_HYP; h++) begin acc_re[h] <= '0; acc_im[h] <= '0; end
        end
        S_ACC: begin
          if (p_v)
            for (int j = 0; j < N_MULT; j++) begin
              acc_re[p_h[j]] <= acc_re[p_h[j]] + AW'(p_re[j]);
              acc_im[p_h[j]] <= acc_im[p_h[j]] + AW'(p_im[j]);
            end
          if (in_valid && rel == idx_t'(HI - 1)) last_seen <= 1'b1;
          if (last_seen && !p_v) begin
            state  <= S_CMP;
            cmp_h  <= '0;
            best_q <= '0;
            best_h <= '0;
          end
        end
        S_CMP: begin
          if (cur_q > best_q || cmp_h == 0) begin
            best_q <= cur_q;
            best_h <= cmp_h;
          end
          if (cmp_h == 4'(N_HYP - 1)) state <= S_OUT;
          else                        cmp_h <= cmp_h + 1'b1;
        end
        S_OUT: begin
          done    <= 1'b1;
          offset  <= 4'(best_h) - 4'(MAX_ERR);
          b_start <= t0_r + idx_t'($signed(4'(best_h) - 4'(MAX_ERR)));
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  initial begin
    assert (N_HYP % N_MULT == 0) else $error("fine_timing: N_HYP must be a multiple of N_MULT");
    assert (B_LEN == (1 << KW)) else $error("fine_timing: B_LEN must be a power of two");
  end
endmodule
