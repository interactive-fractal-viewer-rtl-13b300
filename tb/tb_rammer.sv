// tb_rammer: self-checking test of the rammer with a parameter RAM.
//
// Fills the parameter RAM with random rows, pulses load and checks that
// generate pulses once, 16 edges after the load edge, with every field of
// params assembled from its two 18-bit rows (leap intervals from the low 10
// bits of rows 8 and 9), that params keep their old values until then, and
// that a load while busy is ignored. Also checks the reset defaults.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_rammer;
  import ifv_pkg::*;
  logic clk = 1'b0, rst, load, busy, generate_o;
  logic [3:0] raddr, raddr_q;
  logic [17:0] rdata;
  frac_params_t params, old_p;
  logic cs, wr;
  logic [3:0] waddr;
  logic [31:0] wdata;
  logic [17:0] rows [14];
  int checks = 0, failures = 0, gens = 0;

  always #5 clk = ~clk;

  param_ram u_ram (.clk, .chipselect(cs), .write(wr), .address(waddr), .writedata(wdata),
                   .raddr, .raddr_q, .rdata);
  rammer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && generate_o) gens++;

  initial begin
    int t;
    rst = 1; load = 0; cs = 0; wr = 0; waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(params.a_min == 36'shF80000000 && params.b_min == 36'shFA0000000
          && params.a_diff == 36'sh000666666 && params.a_leap == 10'd2
          && params.c_re == 36'shFCA8F5C29 && params.c_im == 36'shFF125460B, "reset defaults");
    for (int pass = 0; pass < 5; pass++) begin
      for (int r = 0; r < 14; r++) begin
        wdata = $urandom; waddr = 4'(r); cs = 1; wr = 1;
        rows[r] = wdata[17:0];
        @(negedge clk);
      end
      cs = 0; wr = 0;
      old_p = params;
      gens = 0;
      load = 1;
      @(negedge clk) load = 0;
      t = 1;
      while (!generate_o && t < 50) begin
        check(params == old_p, "old set kept while loading");
        if (t == 5) begin load = 1; @(negedge clk) load = 0; t++; end
        else begin @(negedge clk); t++; end
      end
      check(t - 1 == 16, $sformatf("generate %0d edges after the load edge", t - 1));
      check(params.a_min  == {rows[0], rows[1]}   && params.b_min  == {rows[2], rows[3]}, "minima");
      check(params.a_diff == {rows[4], rows[5]}   && params.b_diff == {rows[6], rows[7]}, "steps");
      check(params.a_leap == rows[8][9:0]         && params.b_leap == rows[9][9:0], "leaps");
      check(params.c_re   == {rows[10], rows[11]} && params.c_im   == {rows[12], rows[13]}, "constant");
      repeat (5) @(negedge clk);
      check(gens == 1 && !busy, "one generate per load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
