// tb_fine_timing: for every coarse-timing error e = -4..+4 (twice each, with
// noise and a small frequency offset) a section B is sent whose true start is
// b0 while the block is told t0 = b0 - e. The block must report offset e and
// b_start b0, and done must come within N_HYP + 4 clocks of the last sample
// it uses (t0 + 99).
module tb_fine_timing;
  import hsm_pkg::*;
  import tb_chan_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  idx_t  t0 = '0, in_idx = '0;
  cplx_t in_cur = '0;
  logic  done, busy;
  logic signed [3:0] offset;
  idx_t  b_start;

  fine_timing dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string s);
    failures++;
    if (failures < 12) $display("FAIL: %s", s);
  endtask

  int n_done = 0, done_at = 0;
  logic signed [3:0] d_off;
  idx_t d_bs;
  always @(posedge clk) begin
    #1;
    if (done) begin
      n_done++;
      done_at = int'(cyc);
      d_off   = offset;
      d_bs    = b_start;
    end
  end

  initial begin
    int base = 1000;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int rep = 0; rep < 2; rep++)
      for (int e = -4; e <= 4; e++) begin
        cr_t q[$];
        int b0, got, last_cyc, done_cyc;
        q.delete();
        add_qpsk(q, 40);
        b0 = base + q.size();
        for (int f = 0; f < int'(B_NUM); f++)
          for (int k = 0; k < int'(B_LEN); k++) q.push_back(from_cplx(b_field(k)));
        add_qpsk(q, 40);
        @(negedge clk);
        start = 1'b1;
        t0    = idx_t'(b0 - e);
        @(negedge clk);
        start = 1'b0;
        got = 0; done_cyc = -1; last_cyc = -1;
        for (int n = 0; n < q.size(); n++) begin
          in_valid = 1'b1;
          in_cur   = quant(channel(q[n], 0.01 * (rep + 1), n, 400.0 * rep));
          in_idx   = idx_t'(base + n);
          if (base + n == b0 - e + 99) last_cyc = int'(cyc);
          @(negedge clk);
          in_valid = ($urandom_range(0, 2) != 0) || rep == 0;
          if (!in_valid) @(negedge clk);
        end
        in_valid = 1'b0;
        got      = n_done;
        done_cyc = done_at;
        n_done   = 0;
        checks++;
        if (d_off != 4'(e) || d_bs != idx_t'(b0))
          fail($sformatf("e=%0d: offset %0d b_start %0d expected %0d", e, d_off, d_bs, b0));
        checks++;
        if (got != 1) fail($sformatf("e=%0d: done %0d times", e, got));
        checks++;
        if (done_cyc - last_cyc > int'(N_HYP) + 4)
          fail($sformatf("e=%0d: done %0d clocks after the last sample", e, done_cyc - last_cyc));
        base += q.size() + 100;
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
