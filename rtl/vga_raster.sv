// vga_raster: 640 x 480 VGA timing at a 25 MHz pixel clock.
//
// A horizontal counter runs over H_TOTAL = 800 clocks per line (sync 96,
// back porch 48, active 640, front porch 16, in that order from the start
// of the line) and a vertical counter over V_TOTAL = 525 lines (sync 2,
// back porch 33, active 480, front porch 10). Inside the active area the
// raster shows the pixel position (x_pos, y_pos) and raises re, so that the
// frame buffer can be read combinationally in the same cycle; the colour
// that comes back on rgb is registered at the end of that cycle.
// hs_n, vs_n and blank_n are registered too, so they line up with the
// registered colour one cycle after x_pos/y_pos. Sync pulses are active low;
// blank_n is low outside the active area; sync_n (composite sync) is held
// low as the DAC expects when it is unused.
// Timing numbers follow the design. The registered alignment of sync with
// colour and a blank that covers the whole inactive area are this design's
// own choices. Parameters may be shrunk for simulation.
module vga_raster #(
  parameter int H_SYNC   = 96,
  parameter int H_BACK   = 48,
  parameter int H_ACTIVE = 640,
  parameter int H_FRONT  = 16,
  parameter int V_SYNC   = 2,
  parameter int V_BACK   = 33,
  parameter int V_ACTIVE = 480,
  parameter int V_FRONT  = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [29:0] rgb,
  output logic [9:0]  x_pos,
  output logic [8:0]  y_pos,
  output logic        re,
  output logic        hs_n,
  output logic        vs_n,
  output logic        blank_n,
  output logic        sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  output logic        end_of_frame
);

  localparam int H_TOTAL = H_SYNC + H_BACK + H_ACTIVE + H_FRONT;
  localparam int V_TOTAL = V_SYNC + V_BACK + V_ACTIVE + V_FRONT;
  localparam int H_START = H_SYNC + H_BACK;
  localparam int V_START = V_SYNC + V_BACK;

  logic [10:0] hcount;
  logic [10:0] vcount;
  logic        eol, eof, h_act, v_act;

  assign eol = (hcount == 11'(H_TOTAL - 1));
  assign eof = (vcount == 11'(V_TOTAL - 1));
  assign end_of_frame = eol && eof;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (eol) begin
      hcount <= '0;
      vcount <= eof ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign h_act = (hcount >= 11'(H_START)) && (hcount < 11'(H_START + H_ACTIVE));
  assign v_act = (vcount >= 11'(V_START)) && (vcount < 11'(V_START + V_ACTIVE));
  assign re    = h_act && v_act;
  assign x_pos = 10'(hcount - 11'(H_START));
  assign y_pos = 9'(vcount - 11'(V_START));

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_n    <= 1'b1;
      vs_n    <= 1'b1;
      blank_n <= 1'b0;
      vga_r   <= '0;
      vga_g   <= '0;
      vga_b   <= '0;
    end else begin
      hs_n    <= !(hcount < 11'(H_SYNC));
      vs_n    <= !(vcount < 11'(V_SYNC));
      blank_n <= re;
      {vga_r, vga_g, vga_b} <= re ? rgb : 30'd0;
    end
  end

  assign sync_n = 1'b0;

endmodule
