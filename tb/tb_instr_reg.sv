// tb_instr_reg: self-checking test of the instruction register.
//
// Writes random command bytes, checks the decoded fields (reset, iterate,
// color, refresh, preset) and the read-back, that writes without
// chipselect are ignored, and that load_pulse is high for exactly one
// cycle after each 0 -> 1 change of the refresh bit and never otherwise.
//
// Expected values are worked out here or in ifv_ref_pkg, independently of
// the RTL. The numbers checked against (widths, counts, latencies, rates)
// follow the design; the stimulus, the sizes and the checks are this
// testbench's own.
module tb_instr_reg;
  import ifv_pkg::*;
  logic clk = 1'b0, rst, chipselect, write, load_pulse;
  logic [7:0] writedata, readdata, model;
  instr_t instr;
  int checks = 0, failures = 0, pulses = 0, rises = 0;

  always #5 clk = ~clk;

  instr_reg dut (.*);

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

  always @(posedge clk) if (!rst && load_pulse) pulses++;

  initial begin
    rst = 1; chipselect = 0; write = 0; writedata = 0; model = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(readdata == 0 && !load_pulse, "reset value");
    for (int i = 0; i < 300; i++) begin
      logic [7:0] prev;
      prev = model;
      writedata = 8'($urandom);
      chipselect = ($urandom_range(0, 5) != 0);
      write = 1;
      if (chipselect) model = writedata;
      @(negedge clk);
      chipselect = 0; write = 0;
      check(readdata == model, "read-back");
      check(instr.reset == model[0] && instr.iterate == model[1] && instr.color == model[4:2]
            && instr.refresh == model[5] && instr.fract == model[7:6], "fields");
      check(load_pulse == (model[5] && !prev[5]), "pulse on refresh rise");
      if (model[5] && !prev[5]) rises++;
      @(negedge clk);
      check(!load_pulse, "pulse lasts one cycle");
    end
    check(pulses == rises && rises > 0, "one pulse per rise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
