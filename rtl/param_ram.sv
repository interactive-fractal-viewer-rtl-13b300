// param_ram: the parameter RAM between the processor and the hardware.
//
// The processor bus moves 32 bits per transfer while most parameters are 36
// bits wide, so each parameter is split into two 18-bit halves, each written
// as the low 18 bits of a 32-bit write. Rows are addressed as 32-bit words
// (byte offset = 4 * row). Row map: 0/1 a_min high/low, 2/3 b_min,
// 4/5 a_diff, 6/7 b_diff, 8 a_leap, 9 b_leap, 10/11 c_re, 12/13 c_im.
//
// Interface: a bus-side write port (chipselect, write, word address,
// writedata; bits 31:18 are dropped) and a read port for the rammer with one
// cycle of latency (rdata and raddr_q belong to the raddr of the previous
// cycle). Write and read share the clock. The row count, widths and row map
// follow the design; DEPTH rounds 14 rows up to the 16 an address of 4 bits
// reaches.
module param_ram #(
  parameter int DEPTH  = 16,
  parameter int DATA_W = 18,
  parameter int ADDR_W = 4
) (
  input  logic              clk,
  input  logic              chipselect,
  input  logic              write,
  input  logic [ADDR_W-1:0] address,
  input  logic [31:0]       writedata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [ADDR_W-1:0] raddr_q,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (chipselect && write)
      mem[address] <= writedata[DATA_W-1:0];
    rdata   <= mem[raddr];
    raddr_q <= raddr;
  end

endmodule
