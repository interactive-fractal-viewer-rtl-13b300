// tb_ifm_controller: self-checking test of the IFM controller and its four
// IFMs.
//
// A source model behaves like the window generator: it shows a tuple with
// valid and moves to the next one on the edge where next_val is high. Two
// phases:
//  1. 300 random points under a Julia constant: every point must come out
//     exactly once with the reference count, one result per we pulse.
//  2. 200 points that never escape (c = 0, |z| < 1), the worst case: the
//     steady-state rate must be about 4 results per 133 cycles (accepted:
//     between 4 per 131 and 4 per 135).
// It also counts cycles where the source is held back (next_val low while
// a tuple is offered) and back-to-back results (several IFMs done at once,
// drained one per cycle), and requires both to happen.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_ifm_controller;
  import ifv_pkg::*;
  import ifv_ref_pkg::*;

  localparam int N1 = 300, N2 = 200;

  logic clk = 1'b0, rst;
  tuple_t tuple_in;
  logic valid_in, next_val, we, idle;
  fix_t c_re, c_im;
  result_t result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ifm_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  tuple_t pts [N1];
  int src_idx, src_n;
  int seen [N1];
  int n_out, first_out, last_out, cyc;
  int stalls, multi_done;
  logic we_q = 1'b0;

  assign valid_in = (src_idx < src_n);
  assign tuple_in = valid_in ? pts[src_idx] : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && valid_in && next_val) src_idx <= src_idx + 1;
    if (!rst && valid_in && !next_val) stalls <= stalls + 1;
    if (!rst && we && we_q) multi_done <= multi_done + 1;
    we_q <= we;
    if (!rst && we) begin
      int idx;
      idx = int'(result.y) * 1024 + int'(result.x);
      if (idx < src_n) begin
        seen[idx] <= seen[idx] + 1;
        if (int'(result.k) != julia_k(pts[idx].a, pts[idx].b, c_re, c_im, MAX_ITER))
          begin failures++; $display("FAIL count of point %0d", idx); end
        checks++;
      end else begin
        failures++; checks++;
        $display("FAIL result for an unknown point");
      end
      if (n_out == 0) first_out <= cyc;
      last_out <= cyc;
      n_out <= n_out + 1;
    end
  end

  task automatic run(input int n);
    rst = 1; src_n = n;
    @(posedge clk); #1;
    src_idx = 0; n_out = 0;
    for (int i = 0; i < N1; i++) seen[i] = 0;
    rst = 0;
    while (n_out < n && cyc < 390000) @(posedge clk);
    repeat (200) @(posedge clk);
    #1;
    check(n_out == n, $sformatf("%0d results for %0d points", n_out, n));
    for (int i = 0; i < n; i++) check(seen[i] == 1, $sformatf("point %0d seen once", i));
    check(idle, "idle at the end");
  endtask

  initial begin
    real rate;
    cyc = 0; stalls = 0; multi_done = 0; src_idx = 0; src_n = 0; n_out = 0;
    rst = 1;
    // phase 1
    c_re = 36'shFCA8F5C29; c_im = 36'shFF125460B;
    for (int i = 0; i < N1; i++) begin
      pts[i].a = rand_fix(0);
      pts[i].b = rand_fix(1);
      pts[i].x = xcoord_t'(i % 1024);
      pts[i].y = ycoord_t'(i / 1024);
    end
    repeat (2) @(posedge clk);
    run(N1);
    // phase 2: worst case
    c_re = '0; c_im = '0;
    for (int i = 0; i < N2; i++) begin
      pts[i].a = rand_fix(2);
      pts[i].b = rand_fix(2);
    end
    run(N2);
    // the four IFMs finish in groups: the span covers N2/4 - 1 periods
    rate = real'(last_out - first_out) / real'(N2 - NUM_IFM);
    $display("worst case: %0.2f cycles per result (paper: 133/4 = 33.25)", rate);
    check(rate >= 131.0/4.0 && rate <= 135.0/4.0, "worst-case throughput");
    $display("stalls=%0d multi_done=%0d", stalls, multi_done);
    check(stalls > 0, "source stalled at least once");
    check(multi_done > 0, "simultaneous done seen at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
