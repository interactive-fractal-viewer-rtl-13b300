// vga_mod: the display side, VGA raster plus colorization.
//
// The raster scans the screen and reads the breakaway count of each visible
// pixel from the frame buffer (x_pos, y_pos, re out; count back in the same
// cycle). The count, plus a colour-cycling offset, goes through the colour
// table and is registered onto the VGA outputs.
//
// Cycle colors mode: while cycle_en is high, a free-running SPACER_W-bit
// counter advances every clock and the 8-bit offset steps by one each time
// that counter wraps (every 2^20 clocks, about 24 steps per second at
// 25 MHz with the default), so the colours drift across the image. Reset
// clears both. The offset-before-the-table scheme and the 20-bit spacer
// follow the design; SPACER_W may be lowered for simulation.
module vga_mod
  import ifv_pkg::*;
#(
  parameter int SPACER_W = 20,
  parameter int H_SYNC   = 96,
  parameter int H_BACK   = 48,
  parameter int H_ACTIVE = 640,
  parameter int H_FRONT  = 16,
  parameter int V_SYNC   = 2,
  parameter int V_BACK   = 33,
  parameter int V_ACTIVE = 480,
  parameter int V_FRONT  = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  count_t     count,
  input  logic [2:0] scheme,
  input  logic       cycle_en,
  output xcoord_t    x_pos,
  output ycoord_t    y_pos,
  output logic       re,
  output logic       vga_clk,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic       vga_blank,
  output logic       vga_sync,
  output logic [9:0] vga_r,
  output logic [9:0] vga_g,
  output logic [9:0] vga_b,
  output count_t     cycle,
  output logic       end_of_frame
);

  logic [SPACER_W-1:0] spacer;
  logic [29:0]         rgb;

  always_ff @(posedge clk) begin
    if (rst) begin
      spacer <= '0;
      cycle  <= '0;
    end else if (cycle_en) begin
      spacer <= spacer + 1'b1;
      if (spacer == '0) cycle <= cycle + 1'b1;
    end
  end

  color_lut u_lut (.count(count_t'(count + cycle)), .scheme, .rgb);

  vga_raster #(
    .H_SYNC(H_SYNC), .H_BACK(H_BACK), .H_ACTIVE(H_ACTIVE), .H_FRONT(H_FRONT),
    .V_SYNC(V_SYNC), .V_BACK(V_BACK), .V_ACTIVE(V_ACTIVE), .V_FRONT(V_FRONT)
  ) u_raster (
    .clk, .rst, .rgb,
    .x_pos, .y_pos, .re,
    .hs_n(vga_hs), .vs_n(vga_vs), .blank_n(vga_blank), .sync_n(vga_sync),
    .vga_r, .vga_g, .vga_b, .end_of_frame
  );

  assign vga_clk = clk;

endmodule
