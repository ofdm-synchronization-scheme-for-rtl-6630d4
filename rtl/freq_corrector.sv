// freq_corrector: removes the estimated frequency deviation from the sample
// stream by multiplying sample n with exp(-j*phi(n)), phi(n) = n*dphi.
//
// A phase accumulator (NCO) adds dphi for every sample once enable is high;
// while enable is low the phase stays at zero and samples pass unrotated
// (apart from the pipeline delay and rounding). The phase of each sample
// feeds a pipelined CORDIC in rotation mode that turns the vector
// (1/K, 0) into (cos phi, sin phi) with 2^14 as unit; a registered complex
// multiplier then forms r(n)*(cos phi - j sin phi), rounded and saturated
// back to DW bits. A flag travels with every sample (used to mark the first
// sample of section C).
// The complex multiplication by exp(j*dw*n) is the design's (the sign here
// is chosen so that the measured deviation is removed); the NCO, the CORDIC
// sine/cosine generator and all widths are own choices.
//
// Interface: in_valid/in_s/in_flag accepted every clock. out_valid/out_s/
// out_flag follow LAT = NS+2 clocks later in the same order. dphi is sampled
// whenever a sample enters and enable is high.
module freq_corrector
  import hsm_pkg::*;
#(
  parameter int unsigned NS = 16                   // CORDIC stages
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  ang_t  dphi,
  input  logic  in_valid,
  input  cplx_t in_s,
  input  logic  in_flag,
  output logic  out_valid,
  output cplx_t out_s,
  output logic  out_flag
);
  localparam int unsigned CW  = 18;                // CORDIC x/y width
  localparam int signed   X0  = 9949;              // round(2^14 / K), K = 1.6468
  localparam int unsigned PWD = 2*DW + 2;

  localparam logic [19:0] ATAN [20] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213,
    20'd2607,   20'd1304,  20'd652,   20'd326,   20'd163,   20'd81,
    20'd41,     20'd20,    20'd10,    20'd5,     20'd3,     20'd1,
    20'd1,      20'd0 };

  function automatic ang_t atan_of(input int unsigned i);
    logic [19:0] a;
    a = (i < 20) ? ATAN[i] : 20'd0;
    if (ANG_W >= 20) return ang_t'(a) <<< (ANG_W - 20);
    else             return ang_t'(a >> (20 - ANG_W));
  endfunction

  // ---- NCO
  ang_t phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    phase <= '0;
    else if (!enable)              phase <= '0;
    else if (in_valid)             phase <= phase + dphi;
  end

  // ---- CORDIC pipeline, stage 0 folds the phase into +/-90 degrees
  logic signed [CW-1:0] cx [NS+1];
  logic signed [CW-1:0] cy [NS+1];
  ang_t                 cz [NS+1];
  logic                 cv [NS+1];
  logic                 cf [NS+1];
  cplx_t                cs [NS+1];

  ang_t quarter;
  assign quarter = ang_t'(1) <<< (ANG_W - 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= NS; s++) begin
        cx[s] <= '0; cy[s] <= '0; cz[s] <= '0; cv[s] <= 1'b0; cf[s] <= 1'b0; cs[s] <= '0;
      end
    end else begin
      cv[0] <= in_valid;
      cf[0] <= in_flag;
      cs[0] <= in_s;
      cy[0] <= '0;
      if (phase > quarter || phase < -quarter) begin
        cx[0] <= -CW'(X0);                                   // start at half a turn
        cz[0] <= phase + (ang_t'(1) <<< (ANG_W - 1));
      end else begin
        cx[0] <= CW'(X0);
        cz[0] <= phase;
      end
      for (int s = 0; s < NS; s++) begin
        cv[s+1] <= cv[s];
        cf[s+1] <= cf[s];
        cs[s+1] <= cs[s];
        if (cz[s] >= 0) begin
          cx[s+1] <= cx[s] - (cy[s] >>> s);
          cy[s+1] <= cy[s] + (cx[s] >>> s);
          cz[s+1] <= cz[s] - atan_of(s);
        end else begin
          cx[s+1] <= cx[s] + (cy[s] >>> s);
          cy[s+1] <= cy[s] - (cx[s] >>> s);
          cz[s+1] <= cz[s] + atan_of(s);
        end
      end
    end
  end

  // ---- complex multiplier: r * (c - j s)
  logic signed [CW-1:0]  c_cos, c_sin;
  logic signed [PWD-1:0] m_re, m_im;
  assign c_cos = cx[NS];
  assign c_sin = cy[NS];
  assign m_re  = (PWD'(cs[NS].re) * PWD'(c_cos)) + (PWD'(cs[NS].im) * PWD'(c_sin)) + PWD'(1 <<< 13);
  assign m_im  = (PWD'(cs[NS].im) * PWD'(c_cos)) - (PWD'(cs[NS].re) * PWD'(c_sin)) + PWD'(1 <<< 13);

  function automatic samp_t sat(input logic signed [PWD-1:0] v);
    logic signed [PWD-1:0] q;
    q = v >>> 14;
    if (q > PWD'(2**(DW-1) - 1))  return samp_t'(2**(DW-1) - 1);
    if (q < -PWD'(2**(DW-1)))     return samp_t'(-(2**(DW-1)));
    return samp_t'(q);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_s <= '0; out_flag <= 1'b0;
    end else begin
      out_valid <= cv[NS];
      out_flag  <= cf[NS] & cv[NS];
      out_s.re  <= sat(m_re);
      out_s.im  <= sat(m_im);
    end
  end
endmodule
