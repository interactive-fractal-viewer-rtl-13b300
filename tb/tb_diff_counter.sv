// tb_diff_counter: self-checking test of the differential counter.
//
// Runs several windows with random v_min, v_diff, leap interval and length,
// stepping at random. After every step the value and index are compared
// with the reference (ifv_ref_pkg::dc_value); the test also checks that an
// output changes exactly one edge after next_val, that at_max rises on the
// last index, and that steps at the maximum are ignored.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_diff_counter;
  import ifv_ref_pkg::*;

  logic clk = 1'b0, rst, init, next_val;
  logic signed [35:0] v_min, v_diff, v_out;
  logic [9:0] v_leap, max_itr, c_out;
  logic at_max, ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  diff_counter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (c_out=%0d v_out=%h)", what, c_out, v_out);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps;
    rst = 1; init = 0; next_val = 0;
    v_min = '0; v_diff = '0; v_leap = '0; max_itr = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!ready, "not ready before first init");
    for (int w = 0; w < 12; w++) begin
      v_min   = 36'($urandom) ^ (36'($urandom) << 4);
      v_diff  = 36'($urandom_range(1, 36'h00FFFFFF));
      v_leap  = 10'($urandom_range(0, 5));
      max_itr = 10'($urandom_range(3, 40));
      if (w == 0) max_itr = 10'd639;
      init = 1;
      @(posedge clk); #1 init = 0;
      check(ready && c_out == 0 && v_out == v_min && !at_max, "init state");
      steps = 0;
      while (steps < int'(max_itr)) begin
        next_val = ($urandom_range(0, 3) != 0);
        @(posedge clk); #1;
        if (next_val) steps++;
        check(c_out == 10'(steps), "index follows steps");
        check(v_out == dc_value(v_min, v_diff, int'(v_leap), steps), "value follows model");
        check(at_max == (steps == int'(max_itr)), "at_max only at the end");
      end
      // further steps must be ignored
      next_val = 1;
      repeat (3) @(posedge clk);
      #1 next_val = 0;
      check(c_out == max_itr && at_max, "holds at max");
      check(v_out == dc_value(v_min, v_diff, int'(v_leap), int'(max_itr)), "value holds at max");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
