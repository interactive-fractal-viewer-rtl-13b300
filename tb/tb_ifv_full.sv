// tb_ifv_full: one complete 640 x 480 picture through the viewer at full size.
//
// ifv_top is instantiated with all its defaults: full screen, the real
// 20-bit colour-cycling spacer. The bus model selects the built-in preset
// fract = 10 (c = -0.835 - 0.2321i on the [-2,2) x [-1.5,1.5) window) and
// raises refresh. The test waits for frame_done, checks that the render
// time is within the worst case of 307200 x 133 / 4 cycles, compares all
// 307200 stored counts with the fixed-point reference and with a
// double-precision computation (at least 98% within 5), then checks the
// colour of every visible pixel of one VGA frame (grey scheme 0).
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_ifv_full;
  import ifv_pkg::*;
  import ifv_ref_pkg::*;

  logic clk = 1'b0, rst;
  logic prm_chipselect, prm_write, ins_chipselect, ins_write;
  logic [3:0] prm_address;
  logic [31:0] prm_writedata;
  logic [7:0] ins_writedata, ins_readdata, ledg;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ub_n, sram_lb_n, sram_we_n, sram_ce_n, sram_oe_n;
  logic vga_clk, vga_hs, vga_vs, vga_blank, vga_sync, frame_done;
  logic rammer_busy, read_missed, cache_hit, end_of_frame;
  logic [7:0] color_cycle;
  logic [9:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ifv_top dut (.*);

  sram_model u_sram (.clk, .addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i),
                     .ub_n(sram_ub_n), .lb_n(sram_lb_n), .we_n(sram_we_n),
                     .ce_n(sram_ce_n), .oe_n(sram_oe_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hcnt = 0, vcnt = 0;
  always @(posedge clk) begin
    if (rst) begin hcnt <= 0; vcnt <= 0; end
    else if (hcnt == 799) begin hcnt <= 0; vcnt <= (vcnt == 524) ? 0 : vcnt + 1; end
    else hcnt <= hcnt + 1;
  end

  task automatic ins_wr(input logic [7:0] d);
    @(negedge clk);
    ins_chipselect = 1; ins_write = 1; ins_writedata = d;
    @(negedge clk);
    ins_chipselect = 0; ins_write = 0;
  endtask

  function automatic logic [29:0] grey(input int k);
    int t, l;
    k = k % 256;
    t = (k < 128) ? k : 255 - k;
    l = 8 * t + t / 16;
    return {10'(l), 10'(l), 10'(l)};
  endfunction

  initial begin
    int t, bad, seen, x, y, k, kf, hist_max, close;
    fix_t a, b;
    rst = 1;
    prm_chipselect = 0; prm_write = 0; prm_address = 0; prm_writedata = 0;
    ins_chipselect = 0; ins_write = 0; ins_writedata = 0;
    repeat (4) @(negedge clk);
    rst = 0;

    ins_wr(8'b10_0_000_0_0);
    ins_wr(8'b10_1_000_0_0);
    ins_wr(8'b10_0_000_0_0);
    t = 0;
    while (frame_done && t < 100) begin @(posedge clk); t++; end
    t = 0;
    while (!frame_done && t < 11000000) begin @(posedge clk); t++; end
    check(frame_done, "frame finished");
    $display("640x480 frame rendered in %0d cycles (%0.4f s at 25 MHz)", t, t / 25.0e6);
    check(t <= 307200 * 133 / 4 + 200, "render time within the worst case");

    bad = 0; hist_max = 0; close = 0;
    for (y = 0; y < SCREEN_H; y++)
      for (x = 0; x < SCREEN_W; x++) begin
        a = dc_value(36'shF80000000, 36'sh000666666, 2, x);
        b = dc_value(36'shFA0000000, 36'sh000666666, 2, y);
        k = julia_k(a, b, 36'shFCA8F5C29, 36'shFF125460B, MAX_ITER);
        if (k == MAX_ITER) hist_max++;
        kf = julia_k_real(to_real(a), to_real(b), to_real(36'shFCA8F5C29),
                          to_real(36'shFF125460B), MAX_ITER);
        if (int'(u_sram.peek(y * 1024 + x)) - kf <= 5 && kf - int'(u_sram.peek(y * 1024 + x)) <= 5)
          close++;
        if (int'(u_sram.peek(y * 1024 + x)) != k) begin
          if (bad < 3) $display("  (%0d,%0d) stored %0d expected %0d", x, y, u_sram.peek(y * 1024 + x), k);
          bad++;
        end
      end
    $display("%0d pixels reached the iteration cap", hist_max);
    check(bad == 0, $sformatf("%0d of 307200 stored counts wrong", bad));
    // the accuracy test of the design: at least 98% within 5 of double precision
    $display("%0d of 307200 counts within 5 of double precision (%0.2f%%)", close, 100.0 * close / 307200);
    check(close * 100 >= 98 * 307200, "98% of the counts within 5 of double precision");

    bad = 0; seen = 0;
    while (!(hcnt == 0 && vcnt == 0)) @(posedge clk);
    repeat (800 * 525) begin
      @(negedge clk);
      if (vga_blank) begin
        x = (hcnt == 0 ? 800 : hcnt) - 1 - 144;
        y = vcnt - 35 - (hcnt == 0 ? 1 : 0);
        seen++;
        if ({vga_r, vga_g, vga_b} != grey(int'(u_sram.peek(y * 1024 + x)))) bad++;
      end
    end
    check(seen == 307200 && bad == 0, $sformatf("VGA frame: %0d wrong of %0d", bad, seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
