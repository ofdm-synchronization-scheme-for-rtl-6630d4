// tb_fsm_sincro: walks the controller through blanking, search, section B
// and lock, twice, with a restart in the middle of section B as well. Checks
// the blanking length in samples, the delay select, arm, the single b_go
// pulse with t0 = peak + 17, that lock needs both section-B results (in
// either order), and the clear pulse on restart.
module tb_fsm_sincro;
  import hsm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, in_valid = 1'b0;
  logic found = 1'b0, fine_done = 1'b0, freq_done = 1'b0;
  idx_t peak_idx = '0;
  logic sel_b, arm, clr, b_go, locked, searching;
  idx_t t0;

  fsm_sincro dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_go = 0, n_clr = 0;
  always @(posedge clk) begin
    #1;
    if (b_go) n_go++;
    if (clr)  n_clr++;
  end

  task automatic expect_(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", s);
    end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1'b1;
    @(negedge clk); sig = 1'b0;
  endtask

  // feed n samples with idle clocks between them; return clocks used
  task automatic samples(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
    end
  endtask

  task automatic blank_and_search();
    samples(int'(W_A + D_A) - 1);
    expect_(!arm && !sel_b, "armed before the window is full");
    samples(1);
    @(negedge clk);
    expect_(arm && searching && !sel_b, "not searching after blanking");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int round = 0; round < 2; round++) begin
      int go0;
      blank_and_search();
      samples(30);
      expect_(arm && !locked, "search ended without a peak");
      go0 = n_go;
      @(negedge clk); peak_idx = idx_t'(1000 * round + 321); found = 1'b1;
      @(negedge clk); found = 1'b0;
      expect_(n_go == go0 + 1, "b_go not pulsed once");
      expect_(t0 == idx_t'(1000 * round + 321 + 17), $sformatf("t0 = %0d", t0));
      expect_(sel_b && !arm, "not in section B");
      if (round == 0) begin
        pulse(fine_done);
        repeat (3) @(negedge clk);
        expect_(!locked, "locked without the frequency estimate");
        pulse(freq_done);
      end else begin
        pulse(freq_done);
        repeat (3) @(negedge clk);
        expect_(!locked, "locked without the fine timing");
        pulse(fine_done);
      end
      @(negedge clk);
      expect_(locked && sel_b && !arm, "not locked after both results");
      expect_(n_go == go0 + 1, "extra b_go");
      samples(10);
      expect_(locked, "lock lost without restart");
      begin
        automatic int c0 = n_clr;
        pulse(restart);
        @(negedge clk);
        expect_(n_clr == c0 + 1 && !locked && !arm && !sel_b, "restart not handled");
      end
    end
    // restart in the middle of section B
    blank_and_search();
    pulse(found);
    expect_(sel_b, "section B not entered");
    pulse(restart);
    pulse(fine_done);
    pulse(freq_done);
    expect_(!locked && !sel_b && !arm, "results after restart were taken");
    blank_and_search();
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
