// tb_ifv_worst: the worst-case picture at full size, every pixel at the
// 127-iteration cap.
//
// ifv_top is instantiated with all its defaults. The bus model loads a
// window well inside the unit disc, a from -0.5 to 0.5 and b from -0.375 to
// 0.375, with c = 0: every start point has |z0| < 0.63, so no iterate ever
// escapes and all 307200 pixels cost the full 127 iterations. The test
// times the render from the refresh write to frame_done and checks it
// against the analytic bound of 307200 x 133 / 4 cycles (0.408576 s at
// 25 MHz): it must not exceed it and must come within 2% of it, since the
// four units are then busy all the time. It then checks that every stored
// count is 127.
//
// Expected values are worked out here, independently of the RTL. The bound
// and the iteration cap follow the design; the window is this testbench's
// own choice of a picture that reaches the worst case.
module tb_ifv_worst;
  import ifv_pkg::*;

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

  localparam int BOUND = 307200 * 133 / 4;

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
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prm_wr(input int row, input logic [35:0] v, input bit high);
    @(negedge clk);
    prm_chipselect = 1; prm_write = 1; prm_address = 4'(row);
    prm_writedata = high ? 32'(v[35:18]) : 32'(v[17:0]);
    @(negedge clk);
    prm_chipselect = 0; prm_write = 0;
  endtask

  task automatic ins_wr(input logic [7:0] d);
    @(negedge clk);
    ins_chipselect = 1; ins_write = 1; ins_writedata = d;
    @(negedge clk);
    ins_chipselect = 0; ins_write = 0;
  endtask

  initial begin
    int t, bad;
    // 1/640 of a unit is 1677721.6 LSBs: diff 0x199999, remainder 384 of
    // 640, so a leap after every plain step (leap interval 1)
    logic [35:0] a_min = 36'hFE0000000, b_min = 36'hFE8000000, diff = 36'h000199999;
    rst = 1;
    prm_chipselect = 0; prm_write = 0; prm_address = 0; prm_writedata = 0;
    ins_chipselect = 0; ins_write = 0; ins_writedata = 0;
    repeat (4) @(negedge clk);
    rst = 0;

    prm_wr(0, a_min, 1); prm_wr(1, a_min, 0);
    prm_wr(2, b_min, 1); prm_wr(3, b_min, 0);
    prm_wr(4, diff, 1);  prm_wr(5, diff, 0);
    prm_wr(6, diff, 1);  prm_wr(7, diff, 0);
    prm_wr(8, 36'd1, 0); prm_wr(9, 36'd1, 0);
    for (int r = 10; r < 14; r++) prm_wr(r, 36'd0, 0);

    ins_wr(8'b00_0_000_0_0);
    ins_wr(8'b00_1_000_0_0);
    t = 0;
    while (frame_done && t < 100) begin @(posedge clk); t++; end
    while (!frame_done && t < 11000000) begin @(posedge clk); t++; end
    check(frame_done, "frame finished");
    $display("worst-case 640x480 frame: %0d cycles (%0.6f s at 25 MHz), bound %0d cycles (%0.6f s)",
             t, t / 25.0e6, BOUND, BOUND / 25.0e6);
    check(t <= BOUND, "render time within the bound");
    check(t * 100 >= BOUND * 98, "render time within 2% of the bound");

    bad = 0;
    for (int y = 0; y < SCREEN_H; y++)
      for (int x = 0; x < SCREEN_W; x++)
        if (u_sram.peek(y * 1024 + x) != 8'(MAX_ITER)) bad++;
    check(bad == 0, $sformatf("%0d of 307200 counts not at the cap", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
