// tb_ifv_top: end-to-end test of the whole viewer on a 32 x 24 window.
//
// A bus model plays the processor: it writes the window and constant into
// the parameter RAM as 18-bit halves, then drives the instruction register.
// An SRAM model stands in for the frame buffer chip. The test
//  1. holds the engine in reset (bit 0) and checks nothing is written;
//  2. loads a parameter set (refresh), waits for frame_done and compares
//     every pixel in the SRAM with the fixed-point reference;
//  3. switches to a built-in preset (fract = 01, c = 0) and to a reloaded
//     set with another constant, checking the SRAM each time;
//  4. scans full VGA frames and checks the colour of every visible pixel
//     against the colour rule applied to the stored count, for two colour
//     schemes, then turns colour cycling on and checks the colours move.
// It counts how often each mechanism happened (parameter loads, engine
// restarts, reset hold, preset switch, writes landing while the display
// reads, display reads dropped for a write, odd pixels served without an
// SRAM access, renders slowed by generator stalls, scheme switch, colour
// cycling) and fails for any that never did. All are seen at the pins.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_ifv_top;
  import ifv_pkg::*;
  import ifv_ref_pkg::*;

  localparam int W = 32, H = 24;

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

  ifv_top #(.WIDTH(W), .HEIGHT(H), .SPACER_W(4)) dut (.*);

  sram_model u_sram (.clk, .addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i),
                     .ub_n(sram_ub_n), .lb_n(sram_lb_n), .we_n(sram_we_n),
                     .ce_n(sram_ce_n), .oe_n(sram_oe_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters (from the pins) ----
  int n_load = 0, n_restart = 0, n_hold = 0, n_preset = 0, n_collide = 0,
      n_held = 0, n_scheme = 0, n_cycle = 0, n_drop = 0, n_stall = 0,
      n_missed = 0, n_hit = 0, n_busy = 0, n_eof = 0;
  logic blank_q;
  always @(posedge clk) begin
    blank_q <= vga_blank;
    // a write in a cycle whose pixel is visible on the next cycle
    if (!rst && !sram_we_n && dut_visible_next()) n_collide++;
    // an even pixel always needs the SRAM, so a write there drops the read
    if (!rst && !sram_we_n && dut_visible_next() && hcnt % 2 == 0) n_drop++;
    // the same events as flagged by the frame buffer controller itself
    if (!rst && read_missed) n_missed++;
    if (!rst && cache_hit) n_hit++;
    if (!rst && rammer_busy) n_busy++;
    if (!rst && end_of_frame) n_eof++;
    // a visible pixel produced with no SRAM access at all
    if (!rst && sram_we_n && sram_oe_n && dut_visible_next()) n_held++;
  end

  // raster model: knows which cycles read visible pixels
  int hcnt = 0, vcnt = 0;
  always @(posedge clk) begin
    if (rst) begin hcnt <= 0; vcnt <= 0; end
    else if (hcnt == 799) begin hcnt <= 0; vcnt <= (vcnt == 524) ? 0 : vcnt + 1; end
    else hcnt <= hcnt + 1;
  end
  function automatic bit dut_visible_next();
    return hcnt >= 144 && hcnt < 784 && vcnt >= 35 && vcnt < 515;
  endfunction

  // ---- bus model ----
  task automatic prm_wr(input int row, input logic [31:0] d);
    @(negedge clk);
    prm_chipselect = 1; prm_write = 1; prm_address = 4'(row); prm_writedata = d;
    @(negedge clk);
    prm_chipselect = 0; prm_write = 0;
  endtask

  task automatic ins_wr(input logic [7:0] d);
    @(negedge clk);
    ins_chipselect = 1; ins_write = 1; ins_writedata = d;
    @(negedge clk);
    ins_chipselect = 0; ins_write = 0;
    check(ins_readdata == d && ledg == d, "instruction read-back");
  endtask

  function automatic logic [7:0] cmd(input int fract, input int refresh, input int color,
                                     input int iterate, input int reset_b);
    return 8'((fract << 6) | (refresh << 5) | (color << 2) | (iterate << 1) | reset_b);
  endfunction

  frac_params_t cur;

  task automatic send_params(input frac_params_t p);
    prm_wr(0, 32'(p.a_min[35:18]));  prm_wr(1, 32'(p.a_min[17:0]) | 32'hFFFC0000);
    prm_wr(2, 32'(p.b_min[35:18]));  prm_wr(3, 32'(p.b_min[17:0]));
    prm_wr(4, 32'(p.a_diff[35:18])); prm_wr(5, 32'(p.a_diff[17:0]));
    prm_wr(6, 32'(p.b_diff[35:18])); prm_wr(7, 32'(p.b_diff[17:0]));
    prm_wr(8, 32'(p.a_leap));        prm_wr(9, 32'(p.b_leap));
    prm_wr(10, 32'(p.c_re[35:18]));  prm_wr(11, 32'(p.c_re[17:0]));
    prm_wr(12, 32'(p.c_im[35:18]));  prm_wr(13, 32'(p.c_im[17:0]));
  endtask

  // raise refresh, drop it, wait for the frame
  task automatic redraw(input int fract, input int color);
    int t;
    ins_wr(cmd(fract, 0, color, 0, 0));
    // draw while the display is reading visible lines
    while (vcnt != 100) @(posedge clk);
    ins_wr(cmd(fract, 1, color, 0, 0));
    n_load++;
    ins_wr(cmd(fract, 0, color, 0, 0));
    t = 0;
    while (frame_done && t < 100) begin @(posedge clk); t++; end
    check(!frame_done, "engine restarted");
    if (!frame_done) n_restart++;
    t = 0;
    while (!frame_done && t < 500000) begin @(posedge clk); t++; end
    check(frame_done, "frame finished");
    $display("frame rendered in %0d cycles", t);
    // Without a stall the generator hands out a tuple every 2 cycles and the
    // last result follows within 128 + 8 cycles; a longer render means the
    // generator waited with all units busy.
    if (t > 2 * W * H + 136) n_stall++;
  endtask

  task automatic check_sram(input frac_params_t p, input string what);
    int bad;
    fix_t a, b;
    bad = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        a = dc_value(p.a_min, p.a_diff, int'(p.a_leap), x);
        b = dc_value(p.b_min, p.b_diff, int'(p.b_leap), y);
        if (int'(u_sram.peek(y * 1024 + x)) != julia_k(a, b, p.c_re, p.c_im, MAX_ITER)) begin
          if (bad < 3) $display("  (%0d,%0d) stored %0d, expected %0d", x, y,
                                u_sram.peek(y * 1024 + x), julia_k(a, b, p.c_re, p.c_im, MAX_ITER));
          bad++;
        end
      end
    check(bad == 0, $sformatf("%s: %0d of %0d pixels wrong in SRAM", what, bad, W * H));
  endtask

  function automatic logic [29:0] table_rule(input int k, input int s);
    int t, l;
    k = k % 256;
    t = (k < 128) ? k : 255 - k;
    l = 8 * t + t / 16;
    case (s)
      0: return {10'(l), 10'(l), 10'(l)};
      7: return {10'(1023 - l), 10'(1023 - l), 10'(1023 - l)};
      default: return {(s & 4) ? 10'(l) : 10'd0, (s & 2) ? 10'(l) : 10'd0, (s & 1) ? 10'(l) : 10'd0};
    endcase
  endfunction

  // check one full frame of VGA output; returns the number of wrong pixels
  task automatic scan_frame(input int scheme, input bit exact, output int bad, output int seen);
    int x, y;
    bad = 0; seen = 0;
    // align to the start of a frame
    while (!(hcnt == 0 && vcnt == 0)) @(posedge clk);
    repeat (800 * 525) begin
      @(negedge clk);
      if (vga_blank) begin
        // the colour on the pins belongs to the previous cycle's position
        x = (hcnt == 0 ? 800 : hcnt) - 1 - 144;
        y = vcnt - 35 - (hcnt == 0 ? 1 : 0);
        seen++;
        if (exact && {vga_r, vga_g, vga_b} != table_rule(int'(u_sram.peek(y * 1024 + x)), scheme))
          bad++;
      end
    end
  endtask

  initial begin
    int bad, seen;
    logic [29:0] prev_rgb;
    rst = 1;
    prm_chipselect = 0; prm_write = 0; prm_address = 0; prm_writedata = 0;
    ins_chipselect = 0; ins_write = 0; ins_writedata = 0;
    repeat (4) @(negedge clk);
    rst = 0;

    // 1. engine held in reset: no writes
    ins_wr(cmd(0, 0, 0, 0, 1));
    ins_wr(cmd(0, 1, 0, 0, 1));
    begin
      int writes = 0;
      repeat (3000) begin @(negedge clk); if (!sram_we_n) writes++; end
      check(writes == 0, "no frame buffer writes while the engine is held");
      if (writes == 0) n_hold++;
    end

    // 2. a loaded parameter set
    cur.a_min  = 36'shF80000000;  cur.a_diff = 36'(64'd4 << 30) / W;  cur.a_leap = 10'd1;
    cur.b_min  = 36'shFA0000000;  cur.b_diff = 36'(64'd3 << 30) / H;  cur.b_leap = 10'd1;
    cur.c_re   = 36'shFE6666666;  cur.c_im   = 36'sh026666666;        // -0.4 + 0.6i
    send_params(cur);
    redraw(0, 0);
    check_sram(cur, "loaded set");

    // 3a. preset 01: the 640-pixel window, c = 0
    redraw(1, 0);
    n_preset++;
    begin
      frac_params_t pp;
      pp.a_min = 36'shF80000000; pp.a_diff = 36'sh000666666; pp.a_leap = 10'd2;
      pp.b_min = 36'shFA0000000; pp.b_diff = 36'sh000666666; pp.b_leap = 10'd2;
      pp.c_re = '0; pp.c_im = '0;
      check_sram(pp, "preset 01");
    end
    // 3b. back to a reloaded set with another constant
    cur.c_re = 36'shFCA8F5C29; cur.c_im = 36'shFF125460B;
    send_params(cur);
    redraw(0, 0);
    check_sram(cur, "reloaded set");

    // 4. display
    scan_frame(0, 1, bad, seen);
    check(seen == 640 * 480 && bad == 0, $sformatf("scheme 0 frame: %0d wrong of %0d", bad, seen));
    ins_wr(cmd(0, 0, 5, 0, 0));
    scan_frame(5, 1, bad, seen);
    check(seen == 640 * 480 && bad == 0, $sformatf("scheme 5 frame: %0d wrong of %0d", bad, seen));
    if (bad == 0) n_scheme++;
    // colour cycling: colours must move between frames
    while (!(hcnt == 200 && vcnt == 40)) @(posedge clk);
    @(negedge clk) prev_rgb = {vga_r, vga_g, vga_b};
    ins_wr(cmd(0, 0, 5, 1, 0));
    scan_frame(5, 0, bad, seen);
    while (!(hcnt == 200 && vcnt == 40)) @(posedge clk);
    @(negedge clk);
    check({vga_r, vga_g, vga_b} != prev_rgb, "colour cycling changes the picture");
    if ({vga_r, vga_g, vga_b} != prev_rgb) n_cycle++;

    $display("loads=%0d restarts=%0d hold=%0d preset=%0d collisions=%0d dropped=%0d held_byte=%0d scheme=%0d cycle=%0d stalled_frames=%0d",
             n_load, n_restart, n_hold, n_preset, n_collide, n_drop, n_held, n_scheme, n_cycle, n_stall);
    check(n_load > 0 && n_restart > 0 && n_hold > 0 && n_preset > 0, "control mechanisms seen");
    check(n_collide > 0, "writes while the display reads seen");
    check(n_drop > 0, "display reads dropped for writes seen");
    $display("flags: read_missed=%0d cache_hit=%0d rammer_busy=%0d frames=%0d", n_missed, n_hit, n_busy, n_eof);
    // every write on an even pixel drops a read; one on an odd pixel does too
    // when the held byte is stale because the even read was dropped
    check(n_missed >= n_drop && n_missed <= n_collide, "read_missed matches the dropped reads");
    // a held-byte pixel needs no read, so it is either idle or a write cycle
    check(n_hit > 0 && n_hit <= n_held + n_collide, "cache_hit only where the SRAM is not read");
    // four loads (one while the engine was held), 16 busy cycles each
    check(n_busy == 4 * 16, "rammer busy for 16 cycles per load");
    check(n_eof >= 3, "end_of_frame pulses");
    check(n_stall > 0, "generator stalls seen");
    check(n_held > 0, "odd pixels from the held byte seen");
    check(n_scheme > 0 && n_cycle > 0, "display mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
