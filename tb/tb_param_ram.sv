// tb_param_ram: self-checking test of the parameter RAM.
//
// Writes random 32-bit words to all 16 rows through the bus port (some with
// chipselect or write low, which must be ignored), then reads every row
// back through the rammer port and checks the low 18 bits, the one-cycle
// read latency and the echoed read address.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_param_ram;
  logic clk = 1'b0, chipselect, write;
  logic [3:0] address, raddr, raddr_q;
  logic [31:0] writedata;
  logic [17:0] rdata;
  logic [17:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  param_ram dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chipselect = 0; write = 0; address = 0; writedata = 0; raddr = 0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int r = 0; r < 16; r++) begin
        @(negedge clk);
        address = 4'(r); writedata = $urandom;
        chipselect = 1; write = 1;
        model[r] = writedata[17:0];
        @(negedge clk);
        // an ignored access
        chipselect = $urandom_range(0, 1); write = !chipselect;
        writedata = $urandom;
      end
      chipselect = 0; write = 0;
      for (int r = 0; r < 16; r++) begin
        int rr;
        rr = $urandom_range(0, 15);
        @(negedge clk) raddr = 4'(rr);
        @(negedge clk);
        check(rdata == model[rr] && raddr_q == 4'(rr), $sformatf("row %0d", rr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
