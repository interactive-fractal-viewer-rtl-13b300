// tb_ifm: self-checking test of one Iterative Function Module.
//
// For a few hundred points (random points of the [-2, 2] x [-2, 2] square
// under several Julia constants, plus corner cases: a point already outside
// the escape circle, z = 0 under c = 0 which never escapes, points that
// escape far in one step) it starts the IFM, waits for done and checks
// the count against the fixed-point reference, the coordinates it carries
// through, and the latency: done must rise k + 1 edges after the start edge.
// It also checks ready/done around clr.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_ifm;
  import ifv_pkg::*;
  import ifv_ref_pkg::*;

  logic clk = 1'b0, clr, start;
  tuple_t tuple_in;
  fix_t c_re, c_im;
  result_t result;
  logic ready, done;
  int checks = 0, failures = 0;
  int n_max = 0, n_zero = 0;

  always #5 clk = ~clk;

  ifm dut (.*);

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

  task automatic run_point(input fix_t a, input fix_t b);
    int exp_k, lat;
    exp_k = julia_k(a, b, c_re, c_im, MAX_ITER);
    clr = 1;
    @(posedge clk); #1 clr = 0;
    check(!ready && !done, "not ready while in reset");
    @(posedge clk); #1;
    check(ready && !done, "ready after reset");
    tuple_in.a = a;
    tuple_in.b = b;
    tuple_in.x = xcoord_t'($urandom);
    tuple_in.y = ycoord_t'($urandom);
    start = 1;
    @(posedge clk); #1 start = 0;
    lat = 0;
    check(!ready, "busy after start");
    while (!done && lat < 200) begin
      @(posedge clk); #1 lat++;
    end
    check(done, "done rises");
    check(int'(result.k) == exp_k, $sformatf("count (expected %0d)", exp_k));
    check(lat == exp_k + 1, $sformatf("latency %0d for k=%0d", lat, exp_k));
    check(result.x == tuple_in.x && result.y == tuple_in.y, "coordinates carried");
    repeat (2) @(posedge clk);
    #1 check(done && int'(result.k) == exp_k, "result held until clr");
    if (exp_k == MAX_ITER) n_max++;
    if (exp_k == 0) n_zero++;
  endtask

  initial begin
    clr = 1; start = 0; tuple_in = '0;
    repeat (2) @(posedge clk);
    // corner cases
    c_re = '0; c_im = '0;
    run_point('0, '0);                              // never escapes
    run_point(36'sh0C0000000, 36'sh0C0000000);      // 3 + 3i: outside at once
    run_point(36'sh07C000000, 36'sh000000000);      // 1.9375: escapes far
    c_re = 36'sh100000000; c_im = 36'sh100000000;    // c = 4 + 4i
    run_point(36'sh070000000, 36'sh070000000);
    for (int i = 0; i < 300; i++) begin
      case (i % 4)
        0: begin c_re = 36'shFCA8F5C29; c_im = 36'shFF125460B; end
        1: begin c_re = '0;             c_im = '0;             end
        2: begin c_re = 36'shFE6666666; c_im = 36'sh026666666; end // -0.4 + 0.6i
        default: begin c_re = rand_fix(1); c_im = rand_fix(1); end
      endcase
      run_point(rand_fix(0), rand_fix(0));
    end
    check(n_max > 0 && n_zero > 0, "both extreme counts seen");
    $display("points at the cap: %0d, escaping at once: %0d", n_max, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
