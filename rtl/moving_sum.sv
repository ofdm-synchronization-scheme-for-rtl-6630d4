// moving_sum: running sum of the last W input values (the "moving average"
// blocks of the auto-correlator, without the constant 1/W factor).
//
// A circular buffer of W entries holds the window. For every accepted value
// the sum is updated as sum + new - oldest, so one adder/subtractor does the
// work however long the window is. The 1/W scaling is left out: it is a
// power of two and cancels in the ratio |X|/Y that the detector forms.
//
// Interface: in_valid/in_v enter a value; one clock later out_valid is high
// and out_sum is the sum of that value and the W-1 before it. Until W values
// have entered, the missing ones count as zero (the buffer is cleared by
// reset through a fill counter, not by clearing the memory).
module moving_sum #(
  parameter int unsigned IW = 33,                  // input width
  parameter int unsigned W  = 64,                  // window length
  parameter int unsigned OW = IW + $clog2(W)       // sum width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,               // synchronous restart
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_v,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_sum
);
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1;

  logic signed [IW-1:0] mem [W];
  logic [AW-1:0]        ptr;
  logic [AW:0]          fill;
  logic signed [IW-1:0] oldest;

  assign oldest = (fill == (AW+1)'(W)) ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (in_valid) mem[ptr] <= in_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      fill      <= '0;
      out_sum   <= '0;
      out_valid <= 1'b0;
    end else if (clr) begin
      ptr       <= '0;
      fill      <= '0;
      out_sum   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ptr     <= (ptr == AW'(W - 1)) ? '0 : ptr + 1'b1;
        if (fill != (AW+1)'(W)) fill <= fill + 1'b1;
        out_sum <= out_sum + OW'(in_v) - OW'(oldest);
      end
    end
  end
endmodule
