// peak_search: threshold detection and maximum search on the auto-correlator
// output, giving the coarse timing of a burst.
//
// While armed it waits for a metric flagged above threshold, then follows
// the metric and remembers the largest value and its sample index. The
// search ends when the metric falls below the threshold again, or below
// 2^-DROP of the maximum found so far; found then pulses with peak_idx, the
// index of the maximum. With this preamble the auto-correlation peaks on the
// last sample of the fifth A field: the following -A field turns the delayed
// products negative, and |X|^2 halves about ten samples later, early enough
// for section B to be processed from its start. (Waiting for the threshold
// alone would end the search only 15 samples after the peak, too late.)
// The threshold test and maximum search are the design's; the relative-drop
// end condition is an own choice.
//
// Interface: arm is a level; while it is low the block is idle and forgets
// any search. m_valid/m_metric/m_above/m_idx come from autocorr_a. found is a
// one-clock pulse registered one clock after the deciding metric. hold_e
// goes back to autocorr_a and keeps its power-of-two divisor fixed while a
// peak is followed (combinational from registered inputs).
module peak_search
  import hsm_pkg::*;
#(
  parameter int unsigned MW   = 16,
  parameter int unsigned DROP = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arm,
  input  logic          m_valid,
  input  logic [MW-1:0] m_metric,
  input  logic          m_above,
  input  idx_t          m_idx,
  output logic          hold_e,
  output logic          found,
  output idx_t          peak_idx,
  output logic [MW-1:0] peak_metric
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_TRACK, S_DONE} state_t;
  state_t state;

  // freeze the normalisation exponent of the auto-correlator from the first
  // metric above threshold until the search ends
  assign hold_e = arm && ((state == S_TRACK) || (state == S_WAIT && m_valid && m_above));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; found <= 1'b0; peak_idx <= '0; peak_metric <= '0;
    end else begin
      found <= 1'b0;
      if (!arm) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: state <= S_WAIT;
          S_WAIT: if (m_valid && m_above) begin
            state       <= S_TRACK;
            peak_metric <= m_metric;
            peak_idx    <= m_idx;
          end
          S_TRACK: if (m_valid) begin
            if (m_above && m_metric > peak_metric) begin
              peak_metric <= m_metric;
              peak_idx    <= m_idx;
            end else if (!m_above || m_metric < (peak_metric >> DROP)) begin
              found <= 1'b1;
              state <= S_DONE;
            end
          end
          S_DONE: ;                                   // wait for arm to drop
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
