// tb_moving_sum: random signed values with idle clocks and an occasional
// synchronous clear; the output one clock after each value must equal the
// sum of the last W values (fewer after reset or clear), computed here from
// a plain history list.
module tb_moving_sum;
  localparam int IW = 33, W = 64, OW = IW + 6;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0;
  logic signed [IW-1:0] in_v = '0;
  logic out_valid;
  logic signed [OW-1:0] out_sum;

  moving_sum #(.IW(IW), .W(W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint hist[$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 4000; n++) begin
      longint s;
      @(negedge clk);
      clr      = (n == 1500 || n == 3100);
      in_valid = !clr && ($urandom_range(0, 3) != 0);
      in_v     = IW'({$urandom, $urandom});
      if (clr) hist.delete();
      if (in_valid) hist.push_back(longint'(in_v));
      @(posedge clk);
      #1;
      if (in_valid) begin
        s = 0;
        for (int k = 0; k < W && k < hist.size(); k++) s += hist[hist.size() - 1 - k];
        checks++;
        if (!out_valid || longint'(out_sum) != s) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d sum %0d expected %0d", n, out_sum, s);
        end
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
