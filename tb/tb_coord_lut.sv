// tb_coord_lut: self-checking test of the coordinate-breakaway LUT with an
// SRAM model.
//
// 1. Writes random counts to random pixels and checks the SRAM word and
//    byte lane the pixel address {y, x} selects.
// 2. Reads pixel pairs (even x then odd x) and checks the values; the odd
//    read must be served from the held byte without an SRAM access.
// 3. Mixes writes and reads in the same cycles: the write must go to the
//    SRAM, the read is dropped (read_missed) and rv repeats its last value.
// Counts cache hits, dropped reads and SRAM reads and requires each kind.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_coord_lut;
  import ifv_pkg::*;
  logic clk = 1'b0, rst;
  xcoord_t rx, wx;
  ycoord_t ry, wy;
  logic re, we, read_missed, cache_hit;
  count_t rv, wv;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ub_n, sram_lb_n, sram_we_n, sram_ce_n, sram_oe_n;
  int checks = 0, failures = 0, hits = 0, misses = 0, reads = 0;
  logic [7:0] model [int];

  always #5 clk = ~clk;

  coord_lut dut (.*);
  sram_model u_sram (.clk, .addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i),
                     .ub_n(sram_ub_n), .lb_n(sram_lb_n), .we_n(sram_we_n),
                     .ce_n(sram_ce_n), .oe_n(sram_oe_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pix(input int x, input int y);
    return y * 1024 + x;
  endfunction

  function automatic logic [7:0] expect_v(input int p);
    return model.exists(p) ? model[p] : 8'h00;
  endfunction

  initial begin
    int x, y;
    count_t last;
    rst = 1; re = 0; we = 0; rx = 0; ry = 0; wx = 0; wy = 0; wv = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. writes
    for (int i = 0; i < 400; i++) begin
      x = $urandom_range(0, 15); y = $urandom_range(0, 7);
      wx = 10'(x); wy = 9'(y); wv = 8'($urandom); we = 1;
      #1;
      check(sram_addr == 18'(pix(x, y) >> 1) && !sram_we_n && sram_dq_oe, "write address");
      check(sram_ub_n == !wx[0] && sram_lb_n == wx[0], "write byte lane");
      model[pix(x, y)] = wv;
      @(negedge clk);
    end
    we = 0;
    for (int p = 0; p < 8 * 1024; p++)
      if (model.exists(p)) check(u_sram.peek(p) == model[p], "stored byte");
    // 2. paired reads
    for (y = 0; y < 8; y++)
      for (x = 0; x < 16; x++) begin
        rx = 10'(x); ry = 9'(y); re = 1;
        #1;
        if (cache_hit) hits++;
        if (!sram_oe_n) reads++;
        check(rv == expect_v(pix(x, y)), $sformatf("read (%0d,%0d)", x, y));
        check((x % 2 == 1) == cache_hit, "odd pixel from the held byte");
        @(negedge clk);
      end
    // 3. writes win
    for (int i = 0; i < 300; i++) begin
      x = $urandom_range(0, 15); y = $urandom_range(0, 7);
      rx = 10'(x); ry = 9'(y); re = 1;
      we = ($urandom_range(0, 2) == 0);
      wx = 10'($urandom_range(0, 15)); wy = 9'($urandom_range(0, 7)); wv = 8'($urandom);
      #1;
      if (read_missed) begin
        misses++;
        check(rv == last, "dropped read repeats the last value");
        check(!sram_we_n && sram_oe_n, "write has the SRAM");
      end else begin
        check(rv == expect_v(pix(x, y)) || cache_hit, "read value");
        if (cache_hit) hits++;
        if (!sram_oe_n) reads++;
      end
      if (we) model[pix(int'(wx), int'(wy))] = wv;
      last = rv;
      @(negedge clk);
      // the held byte is updated on a write, so a hit is current too
    end
    re = 0; we = 0;
    for (int p = 0; p < 8 * 1024; p++)
      if (model.exists(p)) check(u_sram.peek(p) == model[p], "final contents");
    $display("hits=%0d dropped=%0d sram reads=%0d", hits, misses, reads);
    check(hits > 0 && misses > 0 && reads > 0, "all access kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
