// tb_vga_raster: self-checking test of the VGA timing generator.
//
// Runs the standard 640 x 480 timing (800 x 525 clocks per frame) for two
// frames and checks: the frame period, the number of clocks per line with
// hs_n low (96) and of lines with vs_n low (2), that re is high for exactly
// 640 x 480 clocks per frame with (x_pos, y_pos) stepping through the active
// area in raster order, that the first active pixel is at clock 144 of
// line 35, and that colour and blank_n are registered copies of the
// previous cycle's rgb and re.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_vga_raster;
  logic clk = 1'b0, rst;
  logic [29:0] rgb;
  logic [9:0] x_pos, vga_r, vga_g, vga_b;
  logic [8:0] y_pos;
  logic re, hs_n, vs_n, blank_n, sync_n, end_of_frame;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_raster dut (.*);

  assign rgb = {x_pos, 1'b0, y_pos, 10'h2A5};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int clk_in_frame, act, hs_low_line, vs_low_clks, exp_x, exp_y, bad_pos, bad_reg;
    logic re_q;
    logic [29:0] rgb_q;
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 2; f++) begin
      act = 0; vs_low_clks = 0; exp_x = 0; exp_y = 0; bad_pos = 0; bad_reg = 0;
      clk_in_frame = 0;
      for (int l = 0; l < 525; l++) begin
        hs_low_line = 0;
        for (int h = 0; h < 800; h++) begin
          if (re) begin
            if (act == 0) check(l == 35 && h == 144, "first active pixel position");
            if (int'(x_pos) != exp_x || int'(y_pos) != exp_y) bad_pos++;
            act++;
            exp_x++;
            if (exp_x == 640) begin exp_x = 0; exp_y++; end
          end
          re_q = re; rgb_q = rgb;
          @(negedge clk);
          clk_in_frame++;
          if (!hs_n) hs_low_line++;
          if (!vs_n) vs_low_clks++;
          if (blank_n != re_q || {vga_r, vga_g, vga_b} != (re_q ? rgb_q : 30'd0)) bad_reg++;
        end
        // hs_n is registered: the line's low clocks land one clock late
        check(hs_low_line == 96, $sformatf("hsync width on line %0d: %0d", l, hs_low_line));
      end
      check(clk_in_frame == 800 * 525, "frame period");
      check(act == 640 * 480, $sformatf("active pixels %0d", act));
      check(vs_low_clks == 2 * 800, "vsync width");
      check(bad_pos == 0, "raster order of x_pos / y_pos");
      check(bad_reg == 0, "registered colour and blank");
      check(sync_n == 1'b0, "composite sync unused");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
