// tb_color_lut: exhaustive check of the colour table.
//
// For all 8 schemes and 256 counts compares the 30-bit output with the
// table rule worked out here: level t = count folded at 128, intensity
// L = 8*t + t/16, channels chosen per scheme (0 grey, 1 to 6 by the
// scheme's R/G/B bits, 7 inverted grey).
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_color_lut;
  import ifv_pkg::*;
  count_t count;
  logic [2:0] scheme;
  logic [29:0] rgb;
  int checks = 0, failures = 0;

  color_lut dut (.*);

  initial begin
    int t, l;
    logic [29:0] e;
    for (int s = 0; s < 8; s++)
      for (int k = 0; k < 256; k++) begin
        scheme = 3'(s); count = 8'(k);
        #1;
        t = (k < 128) ? k : 255 - k;
        l = 8 * t + t / 16;
        case (s)
          0: e = {10'(l), 10'(l), 10'(l)};
          7: e = {10'(1023 - l), 10'(1023 - l), 10'(1023 - l)};
          default: e = {(s & 4) ? 10'(l) : 10'd0, (s & 2) ? 10'(l) : 10'd0, (s & 1) ? 10'(l) : 10'd0};
        endcase
        checks++;
        if (rgb !== e) begin failures++; $display("FAIL scheme %0d count %0d", s, k); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
