// tb_ifm_wrapper: self-checking test of the IFM wrapper.
//
// Hands the wrapper a sequence of points through assign, retires each
// result as soon as done is high (or after a random delay) and checks the
// count and coordinates against the reference, that assign is ignored while
// the wrapper is not ready, that done holds until retire, and that ready
// returns exactly k + 4 edges after the assign edge on an immediate retire.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_ifm_wrapper;
  import ifv_pkg::*;
  import ifv_ref_pkg::*;

  logic clk = 1'b0, rst, assign_i, retire;
  tuple_t tuple_in;
  fix_t c_re, c_im;
  result_t result;
  logic ready, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ifm_wrapper dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (k=%0d)", what, result.k);
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
    int exp_k, t, delay;
    rst = 1; assign_i = 0; retire = 0; tuple_in = '0;
    c_re = 36'shFCA8F5C29; c_im = 36'shFF125460B;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 150; i++) begin
      while (!ready) @(posedge clk);
      #1;
      tuple_in.a = rand_fix(0);
      tuple_in.b = rand_fix(0);
      if (i == 0) begin tuple_in.a = '0; tuple_in.b = '0; c_re = '0; c_im = '0; end
      if (i == 1) begin c_re = 36'shFCA8F5C29; c_im = 36'shFF125460B; end
      tuple_in.x = xcoord_t'(i);
      tuple_in.y = ycoord_t'(i * 3);
      exp_k = julia_k(tuple_in.a, tuple_in.b, c_re, c_im, MAX_ITER);
      assign_i = 1;
      @(posedge clk); #1 assign_i = 0;
      t = 0;
      // a second assign while busy must change nothing
      tuple_in.x = ~tuple_in.x;
      assign_i = 1;
      @(posedge clk); #1 assign_i = 0; t++;
      tuple_in.x = ~tuple_in.x;
      while (!done && t < 300) begin @(posedge clk); #1 t++; end
      check(done && !ready, "done after computing");
      check(int'(result.k) == exp_k, $sformatf("count (expected %0d)", exp_k));
      check(result.x == xcoord_t'(i) && result.y == ycoord_t'(i * 3), "coordinates");
      delay = (i % 3 == 0) ? 0 : $urandom_range(1, 4);
      repeat (delay) begin @(posedge clk); #1 t++; end
      check(done, "done holds until retire");
      retire = 1;
      @(posedge clk); #1 retire = 0; t++;
      check(!done && !ready, "cleared after retire");
      while (!ready && t < 400) begin @(posedge clk); #1 t++; end
      check(t == exp_k + 4 + delay, $sformatf("ready back after %0d edges, k=%0d", t, exp_k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
