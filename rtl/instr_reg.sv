// instr_reg: the instruction register the processor writes to steer the
// hardware.
//
// One byte, written with a single 8-bit bus write and readable back. Its
// fields (bit 0 reset, bit 1 iterate, bits 4:2 color scheme, bit 5 refresh,
// bits 7:6 fractal preset) follow the control software of the design. The
// processor raises refresh to have the parameter RAM copied into the working
// registers; this register turns each rising edge of refresh into a
// one-cycle load pulse, which is this design's own way of making the copy
// happen exactly once per request. Reset clears every bit.
module instr_reg
  import ifv_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       chipselect,
  input  logic       write,
  input  logic [7:0] writedata,
  output logic [7:0] readdata,
  output instr_t     instr,
  output logic       load_pulse
);

  logic refresh_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      instr     <= '0;
      refresh_q <= 1'b0;
    end else begin
      if (chipselect && write) instr <= instr_t'(writedata);
      refresh_q <= instr.refresh;
    end
  end

  assign load_pulse = instr.refresh && !refresh_q;
  assign readdata   = 8'(instr);

endmodule
