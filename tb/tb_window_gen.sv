// tb_window_gen: self-checking test of the window generator.
//
// A 9 x 6 window with random parameters is drained by a consumer that takes
// tuples at random moments. Every tuple must appear exactly once, in
// left-to-right, top-to-bottom order, with a and b equal to the
// differential-counter reference for its x and y; at_max must rise after
// the last one and valid must fall. A second window checks that init
// restarts the walk, and the first tuple must be valid one edge after init.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_window_gen;
  import ifv_pkg::*;
  import ifv_ref_pkg::*;

  localparam int W = 9, H = 6;

  logic clk = 1'b0, rst, init, next_val;
  fix_t a_min, a_diff, b_min, b_diff;
  leap_t a_leap, b_leap;
  tuple_t tuple;
  logic valid, at_max;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  window_gen #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (x=%0d y=%0d)", what, tuple.x, tuple.y);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    bit took;
    rst = 1; init = 0; next_val = 0;
    {a_min, a_diff, b_min, b_diff, a_leap, b_leap} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!valid, "no data before init");
    for (int w = 0; w < 3; w++) begin
      a_min  = 36'($urandom) - 36'sh080000000;
      b_min  = 36'($urandom) - 36'sh080000000;
      a_diff = 36'($urandom_range(1, 36'h00FFFFFF));
      b_diff = 36'($urandom_range(1, 36'h00FFFFFF));
      a_leap = 10'($urandom_range(0, 4));
      b_leap = 10'($urandom_range(0, 4));
      init = 1;
      @(posedge clk); #1 init = 0;
      check(valid && !at_max, "valid right after init");
      n = 0;
      // restart in the middle of the second window
      while (!at_max && !(w == 1 && n == 20)) begin
        next_val = ($urandom_range(0, 2) != 0);
        if (valid) begin
          check(int'(tuple.x) == n % W && int'(tuple.y) == n / W, "pixel order");
          check(tuple.a == dc_value(a_min, a_diff, int'(a_leap), n % W), "a value");
          check(tuple.b == dc_value(b_min, b_diff, int'(b_leap), n / W), "b value");
        end
        took = next_val && valid;
        @(posedge clk); #1;
        if (took) n++;
      end
      next_val = 0;
      if (w != 1) begin
        check(n == W * H, "every pixel exactly once");
        check(at_max && !valid, "at_max and no data at the end");
        repeat (3) @(posedge clk);
        #1 check(at_max && !valid, "stays finished");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
