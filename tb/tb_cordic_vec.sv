// tb_cordic_vec: random vectors of all sizes and in all four quadrants,
// including the axes; the angle must match atan2 to within 16 units of
// 2^-20 turn, and done must come ITER+2 clocks after start.
module tb_cordic_vec;
  import hsm_pkg::*;
  import tb_chan_pkg::*;

  localparam int IW = 40, ITER = 18;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic done, busy;
  ang_t angle;

  cordic_vec #(.IW(IW), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 400; n++) begin
      int  sh, lat;
      real ref_a, got, err;
      sh = $urandom_range(8, IW - 3);
      @(negedge clk);
      case (n)
        0: begin in_re =  IW'(1000); in_im = '0; end
        1: begin in_re = '0; in_im =  IW'(1000); end
        2: begin in_re = -IW'(1000); in_im = '0; end
        3: begin in_re = '0; in_im = -IW'(1000); end
        default: begin
          in_re = IW'($signed({$urandom, $urandom})) >>> (IW - sh);
          in_im = IW'($signed({$urandom, $urandom})) >>> (IW - sh);
        end
      endcase
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      ref_a = cang(real'(in_re), real'(in_im)) / (2.0 * PI) * real'(64'd1 << ANG_W);
      got   = real'(angle);
      err   = got - ref_a;
      if (err >  real'(64'd1 << (ANG_W - 1))) err -= real'(64'd1 << ANG_W);
      if (err < -real'(64'd1 << (ANG_W - 1))) err += real'(64'd1 << ANG_W);
      checks += 2;
      if (err > 16.0 || err < -16.0) begin
        failures++;
        if (failures < 10) $display("FAIL: (%0d,%0d) angle %0d expected %f", in_re, in_im, angle, ref_a);
      end
      if (lat != ITER + 2) begin
        failures++;
        if (failures < 10) $display("FAIL: latency %0d expected %0d", lat, ITER + 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
