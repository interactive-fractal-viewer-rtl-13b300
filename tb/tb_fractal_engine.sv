// tb_fractal_engine: end-to-end test of window generator + IFM controller.
//
// Renders a 20 x 15 window of the square a in [-2, 2), b in [-1.5, 1.5)
// (parameters worked out as the control software does: step =
// span / pixels, leap interval = pixels / (span mod pixels)) under three
// Julia constants, and a fourth render restarted half-way with a new
// constant. The final count of every pixel is compared with the
// fixed-point reference, every pixel must be written (once per frame
// without restart), frame_done must rise, and the counts are also held
// against a double-precision computation: at least 90% must be within 5
// iterations of it (the fixed-point and floating-point orbits of a chaotic
// map drift apart, so exact agreement is not expected).
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_fractal_engine;
  import ifv_pkg::*;
  import ifv_ref_pkg::*;

  localparam int W = 20, H = 15;

  logic clk = 1'b0, rst, start;
  frac_params_t params;
  result_t result;
  logic we, frame_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fractal_engine #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int kmap [W*H];
  int wcount [W*H];

  always @(posedge clk) begin
    if (we) begin
      kmap[int'(result.y) * W + int'(result.x)] <= int'(result.k);
      wcount[int'(result.y) * W + int'(result.x)] <= wcount[int'(result.y) * W + int'(result.x)] + 1;
    end
  end

  function automatic logic signed [35:0] step_of(input longint span, input int n);
    return 36'(span / n);
  endfunction
  function automatic int leap_of(input longint span, input int n);
    return (span % n != 0) ? int'(n / (span % n)) : n;
  endfunction

  task automatic render(input fix_t cr, input fix_t ci, input bit restart);
    int cyc, close_cnt, kr, kf;
    fix_t a, b;
    for (int i = 0; i < W*H; i++) begin kmap[i] = -1; wcount[i] = 0; end
    params.c_re = restart ? 36'sh0 : cr;
    params.c_im = restart ? 36'sh0 : ci;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    if (restart) begin
      repeat (400) @(posedge clk);
      #1 check(!frame_done, "not done half-way");
      params.c_re = cr; params.c_im = ci;
      start = 1;
      @(posedge clk); #1 start = 0;
      // the result register may still hand out one old-frame pixel here
      for (int i = 0; i < W*H; i++) wcount[i] = 0;
    end
    cyc = 0;
    while (!frame_done && cyc < 200000) begin @(posedge clk); #1 cyc++; end
    check(frame_done, "frame_done rises");
    close_cnt = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        a = dc_value(params.a_min, params.a_diff, int'(params.a_leap), x);
        b = dc_value(params.b_min, params.b_diff, int'(params.b_leap), y);
        kr = julia_k(a, b, cr, ci, MAX_ITER);
        check(kmap[y*W + x] == kr, $sformatf("pixel (%0d,%0d) k=%0d expected %0d", x, y, kmap[y*W+x], kr));
        check(wcount[y*W + x] == 1, $sformatf("pixel (%0d,%0d) written once", x, y));
        kf = julia_k_real(to_real(a), to_real(b), to_real(cr), to_real(ci), MAX_ITER);
        if (kr - kf < 5 && kf - kr < 5) close_cnt++;
      end
    $display("frame c=(%f, %f): %0d cycles, %0d of %0d within 5 of double precision",
             to_real(cr), to_real(ci), cyc, close_cnt, W*H);
    check(close_cnt * 10 >= W * H * 9, "agreement with double precision");
  endtask

  initial begin
    rst = 1; start = 0;
    params.a_min  = 36'shF80000000;              // -2.0
    params.b_min  = 36'shFA0000000;              // -1.5
    params.a_diff = step_of(64'd4 << 30, W);
    params.b_diff = step_of(64'd3 << 30, H);
    params.a_leap = leap_t'(leap_of(64'd4 << 30, W));
    params.b_leap = leap_t'(leap_of(64'd3 << 30, H));
    params.c_re = '0; params.c_im = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    render(36'shFCA8F5C29, 36'shFF125460B, 0);   // about -0.833 - 0.232i
    render('0, '0, 0);                           // unit circle
    render(36'shFE6666666, 36'sh026666666, 0);   // -0.4 + 0.6i
    render(36'shFD3333333, 36'sh00A0902DE, 1);   // -0.7 + 0.156i, restarted
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
