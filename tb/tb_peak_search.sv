// tb_peak_search: feeds hand-made metric sequences: a rising ramp with a flat
// stretch, a peak and a fall below half the peak; a peak whose end is the
// threshold; metrics while disarmed; and a second peak after a decision.
// Checks the reported index and value, that found comes one clock after the
// deciding metric, that it comes once per arming, and that hold_e is high
// exactly while a peak is followed.
module tb_peak_search;
  import hsm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  logic m_valid = 1'b0, m_above = 1'b0;
  logic [15:0] m_metric = '0;
  idx_t m_idx = '0;
  logic hold_e, found;
  idx_t peak_idx;
  logic [15:0] peak_metric;

  peak_search dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_found = 0;
  idx_t idx = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 12) $display("FAIL: %s", s);
  endtask

  // send one metric; return whether found pulsed one clock later
  task automatic send(input int m, input bit above, output bit f);
    @(negedge clk);
    m_valid  = 1'b1;
    m_metric = 16'(m);
    m_above  = above;
    m_idx    = idx;
    idx++;
    @(negedge clk);
    m_valid = 1'b0;
    f = found;
  endtask

  task automatic run_case(input int vals[$], input int th, input int exp_idx0,
                          input int exp_dec, input string name);
    int  base = int'(idx);
    bit  f;
    int  got = -1;
    for (int i = 0; i < vals.size(); i++) begin
      send(vals[i], vals[i] >= th, f);
      if (f) begin
        if (got < 0) got = i;
        n_found++;
        checks++;
        if (int'(peak_idx) != base + exp_idx0)
          fail($sformatf("%s: peak at %0d expected %0d", name, int'(peak_idx) - base, exp_idx0));
        checks++;
        if (int'(peak_metric) != vals[exp_idx0])
          fail($sformatf("%s: peak value %0d expected %0d", name, peak_metric, vals[exp_idx0]));
      end
    end
    checks++;
    if (got != exp_dec) fail($sformatf("%s: decided after metric %0d expected %0d", name, got, exp_dec));
  endtask

  initial begin
    int v[$];
    bit f;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;

    // 1: ramp with a flat stretch, peak at 30, fall to below half at 36
    arm = 1'b1;
    v = {};
    for (int i = 0; i < 10; i++) v.push_back(100 + i);           // below threshold 300
    for (int i = 0; i < 10; i++) v.push_back(300 + 20 * i);      // 10..19 rising
    for (int i = 0; i < 10; i++) v.push_back(490);               // 20..29 flat
    v.push_back(1000);                                            // 30 peak
    v.push_back(900); v.push_back(800); v.push_back(700); v.push_back(600);
    v.push_back(550); v.push_back(499);                           // 36: < 1000/2
    v.push_back(480); v.push_back(470);
    run_case(v, 300, 30, 36, "ramp");
    arm = 1'b0;
    @(negedge clk);

    // 2: threshold ends the search before the half drop
    arm = 1'b1;
    v = {100, 200, 400, 500, 600, 550, 520, 200, 100};
    run_case(v, 300, 4, 7, "threshold end");

    // 3: after the decision, metrics are ignored until arm drops
    v = {400, 800, 1200, 100};
    run_case(v, 300, 0, -1, "done, still armed");
    arm = 1'b0;

    // 4: disarmed: nothing is found; hold_e stays low
    v = {400, 800, 1200, 100};
    for (int i = 0; i < v.size(); i++) begin
      send(v[i], 1'b1, f);
      checks++;
      if (f || hold_e) fail("activity while disarmed");
    end

    // 5: hold_e follows the tracking phase
    arm = 1'b1;
    @(negedge clk);
    send(100, 1'b0, f);
    checks++; if (hold_e) fail("hold_e high before the threshold");
    send(400, 1'b1, f);
    checks++; if (!hold_e) fail("hold_e low while tracking");
    send(150, 1'b0, f);
    checks++; if (!f) fail("no decision on falling below threshold");
    checks++; if (hold_e) fail("hold_e high after the decision");

    checks++;
    if (n_found != 2) fail($sformatf("%0d decisions in cases 1-3, expected 2", n_found));
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
