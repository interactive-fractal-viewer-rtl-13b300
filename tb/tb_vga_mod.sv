// tb_vga_mod: self-checking test of the display path (raster + colour
// table + colour cycling), on a shrunk raster (16 x 8 active pixels) with a
// 3-bit cycling spacer.
//
// The frame buffer is modelled by a function of (x_pos, y_pos) answered in
// the same cycle. Each active cycle the next cycle's VGA colour must equal
// the table rule applied to count + offset for the selected scheme. The
// offset must advance once per 8 clocks while cycle_en is high and stand
// still while it is low; every scheme is visited.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_vga_mod;
  import ifv_pkg::*;
  logic clk = 1'b0, rst, re, cycle_en;
  logic vga_clk, vga_hs, vga_vs, vga_blank, vga_sync, end_of_frame;
  count_t count, cycle;
  logic [2:0] scheme;
  xcoord_t x_pos;
  ycoord_t y_pos;
  logic [9:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_mod #(.SPACER_W(3), .H_SYNC(3), .H_BACK(2), .H_ACTIVE(16), .H_FRONT(2),
            .V_SYNC(1), .V_BACK(1), .V_ACTIVE(8), .V_FRONT(1)) dut (.*);

  assign count = 8'(x_pos * 7 + y_pos * 29);

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [29:0] exp_rgb;
    logic was_active;
    int steps, n_active, cyc;
    count_t c0;
    rst = 1; cycle_en = 0; scheme = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(cycle == 0, "offset cleared by reset");
    n_active = 0;
    for (int i = 0; i < 8 * 24 * 12; i++) begin
      scheme = 3'(i / (24 * 12));
      cycle_en = ((i / 300) % 2 == 0);
      was_active = re;
      exp_rgb = table_rule(int'(count) + int'(cycle), int'(scheme));
      @(negedge clk);
      if (was_active) begin
        n_active++;
        check({vga_r, vga_g, vga_b} == exp_rgb && vga_blank, "pixel colour");
      end else begin
        check({vga_r, vga_g, vga_b} == 30'd0 && !vga_blank, "blank colour");
      end
    end
    check(n_active > 1000, "active pixels seen");
    // cycling rate
    cycle_en = 1;
    c0 = cycle;
    repeat (64) @(negedge clk);
    check(cycle == c0 + 8'd8, "offset steps every 8 clocks");
    cycle_en = 0;
    c0 = cycle;
    repeat (64) @(negedge clk);
    check(cycle == c0, "offset holds when cycling is off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
