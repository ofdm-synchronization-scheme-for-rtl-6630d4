// tb_freq_corrector: random noisy samples of constant amplitude, first with
// the correction disabled (output = input), then enabled with a random phase
// step: sample k after enabling must come out as in(k) * exp(-j*k*dphi),
// computed here in real arithmetic. Also checked: the output follows its
// input by NS+2 clocks, keeps the order under idle clocks, and the flag
// stays with its sample.
module tb_freq_corrector;
  import hsm_pkg::*;
  import tb_chan_pkg::*;

  localparam int NS = 16;

  logic  clk = 1'b0, rst_n = 1'b0, enable = 1'b0, in_valid = 1'b0, in_flag = 1'b0;
  ang_t  dphi = '0;
  cplx_t in_s = '0;
  logic  out_valid, out_flag;
  cplx_t out_s;

  freq_corrector #(.NS(NS)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { real re; real im; bit flag; longint t; } exp_t;
  exp_t expq[$];

  task automatic fail(input string s);
    failures++;
    if (failures < 12) $display("FAIL: %s", s);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int ph = 0; ph < 3; ph++) begin
      real w;
      automatic int k = 0;
      @(negedge clk);
      w      = (urand() * 2.0 - 1.0) * PI / 16.0;
      dphi   = ang_t'($rtoi(w / (2.0 * PI) * real'(64'd1 << ANG_W)));
      enable = (ph != 0);
      for (int n = 0; n < 600; n++) begin
        automatic cr_t c;
        automatic real a = urand() * 2.0 * PI, wq = ang2rad(dphi);
        automatic exp_t e;
        c.re = 20000.0 * $cos(a);
        c.im = 20000.0 * $sin(a);
        in_valid = ($urandom_range(0, 3) != 0);
        in_s     = quant(c);
        in_flag  = ($urandom_range(0, 9) == 0);
        if (in_valid) begin
          automatic real th = enable ? wq * real'(k) : 0.0;
          e.re   = real'(in_s.re) * $cos(th) + real'(in_s.im) * $sin(th);
          e.im   = real'(in_s.im) * $cos(th) - real'(in_s.re) * $sin(th);
          e.flag = in_flag;
          e.t    = cyc + NS + 2;
          expq.push_back(e);
          k++;
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (NS + 4) @(negedge clk);
      enable = 1'b0;
    end
    checks++;
    if (expq.size() != 0) fail($sformatf("%0d outputs missing", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      automatic exp_t e = expq.pop_front();
      automatic real dr = real'(out_s.re) - e.re, di = real'(out_s.im) - e.im;
      checks++;
      if (dr * dr + di * di > 40.0 * 40.0)
        fail($sformatf("out (%0d,%0d) expected (%f,%f)", out_s.re, out_s.im, e.re, e.im));
      checks++;
      if (cyc != e.t) fail($sformatf("latency %0d expected %0d", cyc - e.t + NS + 2, NS + 2));
      checks++;
      if (out_flag != e.flag) fail("flag lost its sample");
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
