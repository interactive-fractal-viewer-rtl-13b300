// sram_model: behavioural model of an asynchronous 256K x 16 SRAM with
// byte lanes, as fitted on the target board (not synthesizable intent).
//
// Reads are combinational: with ce_n and oe_n low and we_n high, dq_o shows
// the addressed word (lanes disabled by ub_n / lb_n read as zero). A write
// with ce_n and we_n low stores the enabled lanes of dq_i at the clock edge
// (the controller holds the write for a full cycle, so sampling it at the
// edge is equivalent). The model counts reads and writes and starts with
// all words zero.
//
// The organisation (256K x 16, byte lanes, one data port) follows the
// board's SRAM as the design uses it; the clocked write and the absence of
// access-time detail are this model's own simplifications.
module sram_model #(
  parameter int WORDS = 262144
) (
  input  logic        clk,
  input  logic [17:0] addr,
  input  logic [15:0] dq_i,
  output logic [15:0] dq_o,
  input  logic        ub_n,
  input  logic        lb_n,
  input  logic        we_n,
  input  logic        ce_n,
  input  logic        oe_n
);

  logic [15:0] mem [WORDS];
  int unsigned n_reads, n_writes;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    n_reads  = 0;
    n_writes = 0;
  end

  always_comb begin
    dq_o = '0;
    if (!ce_n && !oe_n && we_n) begin
      if (!ub_n) dq_o[15:8] = mem[addr][15:8];
      if (!lb_n) dq_o[7:0]  = mem[addr][7:0];
    end
  end

  always @(posedge clk) begin
    if (!ce_n && !we_n) begin
      if (!ub_n) mem[addr][15:8] <= dq_i[15:8];
      if (!lb_n) mem[addr][7:0]  <= dq_i[7:0];
      n_writes <= n_writes + 1;
    end else if (!ce_n && !oe_n) begin
      n_reads <= n_reads + 1;
    end
  end

  function automatic logic [7:0] peek(input int pix_addr);
    return pix_addr[0] ? mem[pix_addr >> 1][15:8] : mem[pix_addr >> 1][7:0];
  endfunction

endmodule
