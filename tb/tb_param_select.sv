// tb_param_select: self-checking test of the parameter source selection.
//
// For each fract code and a random loaded set, checks one cycle later that
// 00 passes the loaded set and 01 / 10 / 11 give the three presets (window
// -2..2 by -1.5..1.5 with step 0.00625 and leap 2, and the constants
// 0, -0.833-0.232i and -0.833-0.013i as raw Q6.30 words).
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_param_select;
  import ifv_pkg::*;
  logic clk = 1'b0;
  logic [1:0] fract;
  frac_params_t loaded, params, exp_p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  param_select dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      fract = 2'(i);
      loaded = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      exp_p.a_min = 36'hF80000000; exp_p.a_diff = 36'h000666666; exp_p.a_leap = 10'd2;
      exp_p.b_min = 36'hFA0000000; exp_p.b_diff = 36'h000666666; exp_p.b_leap = 10'd2;
      case (fract)
        2'b00: exp_p = loaded;
        2'b01: begin exp_p.c_re = 36'h0; exp_p.c_im = 36'h0; end
        2'b10: begin exp_p.c_re = 36'hFCA8F5C29; exp_p.c_im = 36'hFF125460B; end
        default: begin exp_p.c_re = 36'hFCA8F5C29; exp_p.c_im = 36'hFFF25460B; end
      endcase
      @(negedge clk);
      checks++;
      if (params !== exp_p) begin failures++; $display("FAIL fract=%b", fract); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
