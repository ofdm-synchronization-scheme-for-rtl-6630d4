// tb_delay_line: random samples with random idle clocks; the delay select
// changes between 16 and 32 now and then. Every output must be the sample
// just accepted plus the one 16 or 32 samples older (zero before that many
// samples exist), one clock after the input.
module tb_delay_line;
  import hsm_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, sel_b = 1'b0;
  cplx_t in_s = '0;
  logic  out_valid;
  cplx_t out_cur, out_del;

  delay_line dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t hist[$];
  logic  exp_v = 1'b0;
  cplx_t exp_cur, exp_del;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 200 == 0) sel_b = ~sel_b;
      in_valid = ($urandom_range(0, 4) != 0);
      in_s     = cplx_t'($urandom);
      exp_v    = in_valid;
      if (in_valid) begin
        automatic int d = sel_b ? int'(D_B) : int'(D_A);
        hist.push_back(in_s);
        exp_cur = in_s;
        exp_del = (hist.size() > d) ? hist[hist.size() - 1 - d] : '0;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== exp_v || (exp_v && (out_cur !== exp_cur || out_del !== exp_del))) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d valid %0d/%0d cur %h/%h del %h/%h", n,
                                    out_valid, exp_v, out_cur, exp_cur, out_del, exp_del);
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
