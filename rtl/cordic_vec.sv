// cordic_vec: angle of a complex number by an iterative CORDIC in vectoring
// mode, one micro-rotation a clock.
//
// On start the input is first shifted up so that its larger component fills
// the word (the angle does not change). A first step then turns vectors in the left half-plane by half a turn, so the
// remaining angle lies within +/-90 degrees. Each following iteration i
// rotates the vector by +/-atan(2^-i), towards the positive real axis, with
// shifts and adds only, and accumulates the rotation in z. After ITER
// iterations z holds the angle of the input. The vector's length is not
// needed and not produced.
// The design asks only for "the angle" of the frequency-estimation result;
// the CORDIC, its iteration count and the angle format (binary angle, 2^ANG_W
// units per turn, so a half turn is -2^(ANG_W-1) and wrap-around is free) are
// own choices.
//
// Interface: start loads in_re/in_im (signed, IW bits). ITER+2 clocks later
// done pulses for one clock and angle holds the result until the next start.
module cordic_vec
  import hsm_pkg::*;
#(
  parameter int unsigned IW   = 40,
  parameter int unsigned ITER = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 done,
  output ang_t                 angle,
  output logic                 busy
);
  localparam int unsigned XW = IW + 2;                  // CORDIC gain headroom

  // atan(2^-i) in units of 2^-20 turn
  localparam int unsigned ATAN_N = 20;
  localparam logic [19:0] ATAN [ATAN_N] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213,
    20'd2607,   20'd1304,  20'd652,   20'd326,   20'd163,   20'd81,
    20'd41,     20'd20,    20'd10,    20'd5,     20'd3,     20'd1,
    20'd1,      20'd0 };

  function automatic ang_t atan_of(input int unsigned i);
    logic [19:0] a;
    a = (i < ATAN_N) ? ATAN[i] : 20'd0;
    if (ANG_W >= 20) return ang_t'(a) <<< (ANG_W - 20);
    else             return ang_t'(a >> (20 - ANG_W));
  endfunction

  logic signed [XW-1:0] x, y;

  // normalisation: shift the input up until its larger component uses the
  // top bits of the word, so that small vectors keep their precision
  logic        [IW-1:0] mag_or;
  logic signed [IW-1:0] n_re, n_im;
  int unsigned          top, nsh;
  always_comb begin
    mag_or = (in_re < 0 ? IW'(-in_re) : IW'(in_re)) | (in_im < 0 ? IW'(-in_im) : IW'(in_im));
    top    = 0;
    for (int unsigned b = 0; b < IW; b++) if (mag_or[b]) top = b;
    nsh    = (top < IW - 2) ? (IW - 2 - top) : 0;
    n_re   = in_re <<< nsh;
    n_im   = in_im <<< nsh;
  end
  ang_t                 z;
  logic [$clog2(ITER+1)-1:0] it;
  logic                 run, fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0; run <= 1'b0; fin <= 1'b0; done <= 1'b0; angle <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run <= 1'b1;
        it  <= '0;
        if (n_re < 0) begin                          // rotate by half a turn
          x <= -XW'(n_re);
          y <= -XW'(n_im);
          z <= ang_t'(1) <<< (ANG_W - 1);
        end else begin
          x <= XW'(n_re);
          y <= XW'(n_im);
          z <= '0;
        end
      end else if (run) begin
        if (y >= 0) begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + atan_of(32'(it));
        end else begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - atan_of(32'(it));
        end
        if (it == $bits(it)'(ITER - 1)) begin
          run <= 1'b0;
          fin <= 1'b1;
        end else begin
          it <= it + 1'b1;
        end
      end
      if (fin) begin
        fin   <= 1'b0;
        done  <= 1'b1;
        angle <= z;
      end
    end
  end

  assign busy = run;
endmodule
