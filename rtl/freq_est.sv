// freq_est: frequency-deviation estimator on preamble section B.
//
// From the first sample of section B (t0, from the coarse timing) the
// received signal is correlated with itself delayed by D_B = 32 samples:
// the products r(n)*conj(r(n-32)) for n = t0+32 .. t0+127 (96 products, up
// to the end of section B) are summed into Y. A frequency deviation dw
// (radians per sample) turns every product by 32*dw, so angle(Y)/32 is the
// deviation. The angle comes from cordic_vec; dividing by 32 is an
// arithmetic shift. The estimate is unambiguous for |dw| < pi/32.
// Delay, product count and method are the design's; the CORDIC, the
// binary-angle format (2^ANG_W per turn) and widths are own choices.
//
// The products themselves are not formed here: they come from the
// conjugate multiplier of the section-A auto-correlator, which computes
// exactly r(n)*conj(r(n-32)) once the shared delay line is set to 32. This
// is the sharing of multipliers between the two sections that the design
// describes.
//
// Interface: start (one clock) loads t0. in_valid/in_re/in_im is the
// product stream, tagged with the index in_idx of r(n). About ITER+4 clocks
// after product t0+127, done pulses with dphi (phase step per sample) and
// angle (angle of Y); both hold until the next start.
module freq_est
  import hsm_pkg::*;
#(
  parameter int unsigned ITER = 18
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  idx_t  t0,
  input  logic                 in_valid,
  input  logic signed [2*DW:0] in_re,
  input  logic signed [2*DW:0] in_im,
  input  idx_t                 in_idx,
  output logic  done,
  output ang_t  dphi,
  output ang_t  angle,
  output logic  busy
);
  localparam int unsigned PW  = 2*DW + 1;
  localparam int unsigned YW  = PW + $clog2(F_AVG);
  localparam int unsigned LO  = D_B;
  localparam int unsigned HI  = D_B + F_AVG;
  localparam int unsigned SH  = $clog2(D_B);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_ANG} state_t;
  state_t state;

  idx_t                 t0_r, rel;
  logic                 p_v, last_seen;
  logic signed [PW-1:0] p_re, p_im;
  logic signed [YW-1:0] y_re, y_im;
  logic                 c_start, c_done;
  ang_t                 c_angle;

  assign rel = in_idx - t0_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; t0_r <= '0; p_v <= 1'b0; p_re <= '0; p_im <= '0;
      y_re <= '0; y_im <= '0; last_seen <= 1'b0; c_start <= 1'b0;
      done <= 1'b0; dphi <= '0; angle <= '0;
    end else begin
      p_v     <= 1'b0;
      c_start <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          t0_r <= t0; y_re <= '0; y_im <= '0; last_seen <= 1'b0;
          state <= S_ACC;
        end
        S_ACC: begin
          if (in_valid && rel >= idx_t'(LO) && rel < idx_t'(HI)) begin
            p_v  <= 1'b1;
            p_re <= in_re;
            p_im <= in_im;
            if (rel == idx_t'(HI - 1)) last_seen <= 1'b1;
          end
          if (p_v) begin
            y_re <= y_re + YW'(p_re);
            y_im <= y_im + YW'(p_im);
          end
          if (last_seen && !p_v) begin
            c_start <= 1'b1;
            state   <= S_ANG;
          end
        end
        S_ANG: if (c_done) begin
          angle <= c_angle;
          dphi  <= c_angle >>> SH;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  cordic_vec #(.IW(YW), .ITER(ITER)) u_angle (
    .clk, .rst_n, .start(c_start), .in_re(y_re), .in_im(y_im),
    .done(c_done), .angle(c_angle), .busy());

  assign busy = (state != S_IDLE);

  initial assert (D_B == (1 << SH)) else $error("freq_est: D_B must be a power of two");
endmodule
