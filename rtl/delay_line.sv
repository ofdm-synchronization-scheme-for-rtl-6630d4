// delay_line: the sample memory shared by both synchronisation phases.
//
// It keeps the last DEPTH input samples in a circular buffer and, with each
// new sample, presents that sample together with the one received DLY
// samples earlier. DLY is chosen at run time: D_A (16) while section A is
// searched, D_B (32) while section B is processed. Coarse and fine
// synchronisation happen at different times, so one memory serves as both the
// 16-deep FIFO of the auto-correlator and the 32-deep FIFO of the frequency
// estimator, as the design intends when it says the memories are shared.
//
// Interface: in_valid/in_s is the sample stream (at most one sample a clock).
// sel_b selects the delay. One clock after an accepted sample, out_valid is
// high with out_cur (that sample) and out_del (the delayed one). Until DLY
// samples have been written since reset the delayed output reads as zero
// (own choice; the memory itself is not reset, so it can map to a RAM).
module delay_line
  import hsm_pkg::*;
#(
  parameter int unsigned DEPTH = D_B,
  parameter int unsigned DLY0  = D_A,
  parameter int unsigned DLY1  = D_B
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_s,
  input  logic  sel_b,
  output logic  out_valid,
  output cplx_t out_cur,
  output cplx_t out_del
);
  localparam int unsigned AW = $clog2(DEPTH);

  cplx_t            mem [DEPTH];
  logic [AW-1:0]    wptr;
  logic [AW:0]      fill;          // saturating count of written samples
  logic [AW-1:0]    rptr;
  logic [AW:0]      dly;

  assign dly  = sel_b ? (AW+1)'(DLY1) : (AW+1)'(DLY0);
  assign rptr = wptr - dly[AW-1:0];            // DEPTH is a power of two

  always_ff @(posedge clk) begin
    if (in_valid) mem[wptr] <= in_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_cur   <= '0;
      out_del   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        wptr    <= wptr + 1'b1;
        if (fill != (AW+1)'(DEPTH)) fill <= fill + 1'b1;
        out_cur <= in_s;
        out_del <= (fill >= dly) ? mem[rptr] : '0;
      end
    end
  end

  initial begin
    assert (DEPTH == (1 << AW)) else $error("delay_line: DEPTH must be a power of two");
    assert (DLY0 <= DEPTH && DLY1 <= DEPTH) else $error("delay_line: delay exceeds DEPTH");
  end
endmodule
