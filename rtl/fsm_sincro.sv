// fsm_sincro: sequencing of the synchroniser.
//
// Coarse synchronisation (section A) and fine synchronisation (section B)
// happen one after the other, which is what lets them share the sample
// memory. The controller runs four phases:
//   BLANK  after reset or restart: the auto-correlator's 64-sample windows
//          (and the 16-sample delay) refill; no search yet.
//   SEARCH delay line at 16, peak search armed. When it reports the peak
//          (last sample of the fifth A field) the first sample of section
//          B is expected at t0 = peak + A_LEN + 1, after the -A field.
//   SECB   delay line at 32; fine timing and frequency estimation run on
//          section B from t0 (b_go pulses once with t0).
//   LOCK   both results are in; locked is high until restart.
// The existence of a section-A state machine and the time sharing are the
// design's; the states, the blanking length and the restart input are own
// choices.
//
// Interface: in_valid counts samples leaving the delay line. found/peak_idx
// from peak_search, fine_done/freq_done from the section-B blocks. clr is a
// one-clock pulse on restart that clears the auto-correlator windows.
module fsm_sincro
  import hsm_pkg::*;
#(
  parameter int unsigned BLANK = W_A + D_A
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic in_valid,
  input  logic found,
  input  idx_t peak_idx,
  input  logic fine_done,
  input  logic freq_done,
  output logic sel_b,
  output logic arm,
  output logic clr,
  output logic b_go,
  output idx_t t0,
  output logic locked,
  output logic searching
);
  typedef enum logic [1:0] {S_BLANK, S_SEARCH, S_SECB, S_LOCK} state_t;
  state_t state;
  logic [$clog2(BLANK+1)-1:0] cnt;
  logic fine_ok, freq_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_BLANK; cnt <= '0; clr <= 1'b0; b_go <= 1'b0; t0 <= '0;
      fine_ok <= 1'b0; freq_ok <= 1'b0;
    end else begin
      clr  <= 1'b0;
      b_go <= 1'b0;
      if (restart) begin
        state <= S_BLANK;
        cnt   <= '0;
        clr   <= 1'b1;
      end else begin
        unique case (state)
          S_BLANK: if (in_valid) begin
            if (cnt == $bits(cnt)'(BLANK - 1)) state <= S_SEARCH;
            else                              cnt   <= cnt + 1'b1;
          end
          S_SEARCH: if (found) begin
            t0      <= peak_idx + idx_t'(A_LEN + 1);
            b_go    <= 1'b1;
            fine_ok <= 1'b0;
            freq_ok <= 1'b0;
            state   <= S_SECB;
          end
          S_SECB: begin
            if (fine_done) fine_ok <= 1'b1;
            if (freq_done) freq_ok <= 1'b1;
            if ((fine_ok || fine_done) && (freq_ok || freq_done)) state <= S_LOCK;
          end
          S_LOCK: ;
          default: state <= S_BLANK;
        endcase
      end
    end
  end

  assign sel_b     = (state == S_SECB) || (state == S_LOCK);
  assign arm       = (state == S_SEARCH);
  assign locked    = (state == S_LOCK);
  assign searching = (state == S_SEARCH);
endmodule
