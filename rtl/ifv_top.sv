// ifv_top: the Interactive Fractal Viewer, hardware side.
//
// Draws quadratic Julia sets: for every pixel of a 640 x 480 window of the
// complex plane it counts how many iterations of z <- z^2 + c it takes for
// |z| to pass 2 (at most 127), stores that count in a frame buffer in the
// external SRAM, and continuously shows the frame buffer on VGA through a
// colour table.
//
// Data flow: the processor writes window and constant parameters into the
// parameter RAM (bus port prm_*) and commands into the instruction register
// (bus port ins_*). Raising the register's refresh bit makes the rammer copy
// the RAM into working registers and then pulse generate, which restarts the
// fractal engine (window generator + IFM controller + 4 IFMs) on the set
// chosen by param_select (loaded set or one of three presets). The engine's
// (x, y, k) results go to the coordinate-breakaway LUT, which shares the
// SRAM with the VGA module's reads. The instruction register's other bits
// hold the engine in reset (bit 0), enable colour cycling (bit 1) and pick
// the colour scheme (bits 4:2).
//
// Everything runs on one clock, clk, meant to be the 25 MHz pixel clock;
// the bus ports are taken to be synchronous to it. The processor, its bus,
// the PLL and the SRAM chip are outside this module: their signals are
// ports. frame_done rises when the engine has written every pixel.
//
// Timing: the engine starts one edge after the rammer's generate pulse,
// because param_select registers the set it passes on. A picture takes
// about 33 cycles per pixel at worst (0.41 s for 640 x 480 at 25 MHz).
//
// Following the design: the block structure, the bus-written parameter RAM
// and instruction register with its bit map (bit 0 resets the engine), the
// refresh/rammer/generate sequence and the SRAM frame buffer shared with
// the display. This design's own choices: a single clock for the bus,
// engine and display, the start delay, and frame_done as an output.
module ifv_top
  import ifv_pkg::*;
#(
  parameter int WIDTH    = SCREEN_W,
  parameter int HEIGHT   = SCREEN_H,
  parameter int SPACER_W = 20
) (
  input  logic        clk,
  input  logic        rst,
  // parameter RAM slave port (word addressed, low 18 bits of the data used)
  input  logic        prm_chipselect,
  input  logic        prm_write,
  input  logic [3:0]  prm_address,
  input  logic [31:0] prm_writedata,
  // instruction register slave port
  input  logic        ins_chipselect,
  input  logic        ins_write,
  input  logic [7:0]  ins_writedata,
  output logic [7:0]  ins_readdata,
  // SRAM pins (data bus split into out / enable / in)
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic        sram_we_n,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  // VGA DAC
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank,
  output logic        vga_sync,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  // status
  output logic [7:0]  ledg,
  output logic        frame_done,
  output logic        rammer_busy,   // parameter copy in progress
  output logic        read_missed,   // a display read was dropped for a write
  output logic        cache_hit,     // an odd pixel came from the held byte
  output logic        end_of_frame,  // last clock of a VGA frame
  output logic [7:0]  color_cycle    // current colour-cycling offset
);

  instr_t       instr;
  logic         load_pulse, generate_pulse, start_q;
  logic [3:0]   ram_raddr, ram_raddr_q;
  logic [17:0]  ram_rdata;
  frac_params_t loaded, params;
  result_t      result;
  logic         we;
  xcoord_t      rx;
  ycoord_t      ry;
  logic         re;
  count_t       rv;

  param_ram u_pram (
    .clk,
    .chipselect (prm_chipselect),
    .write      (prm_write),
    .address    (prm_address),
    .writedata  (prm_writedata),
    .raddr      (ram_raddr),
    .raddr_q    (ram_raddr_q),
    .rdata      (ram_rdata)
  );

  instr_reg u_ireg (
    .clk, .rst,
    .chipselect (ins_chipselect),
    .write      (ins_write),
    .writedata  (ins_writedata),
    .readdata   (ins_readdata),
    .instr,
    .load_pulse
  );

  rammer u_rammer (
    .clk, .rst,
    .load       (load_pulse),
    .raddr      (ram_raddr),
    .raddr_q    (ram_raddr_q),
    .rdata      (ram_rdata),
    .params     (loaded),
    .busy       (rammer_busy),
    .generate_o (generate_pulse)
  );

  param_select u_sel (
    .clk,
    .fract  (instr.fract),
    .loaded,
    .params
  );

  // param_select registers its output, so the new set reaches the engine
  // one edge after the rammer's generate pulse; start waits for it.
  always_ff @(posedge clk)
    if (rst) start_q <= 1'b0;
    else     start_q <= generate_pulse;

  fractal_engine #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_engine (
    .clk,
    .rst        (rst || instr.reset),
    .start      (start_q),
    .params,
    .result, .we, .frame_done
  );

  coord_lut u_lut (
    .clk, .rst,
    .rx, .ry, .re, .rv,
    .wx (result.x), .wy (result.y), .wv (result.k), .we,
    .read_missed, .cache_hit,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ub_n, .sram_lb_n, .sram_we_n, .sram_ce_n, .sram_oe_n
  );

  vga_mod #(.SPACER_W(SPACER_W)) u_vga (
    .clk, .rst,
    .count    (rv),
    .scheme   (instr.color),
    .cycle_en (instr.iterate),
    .x_pos    (rx),
    .y_pos    (ry),
    .re,
    .vga_clk, .vga_hs, .vga_vs, .vga_blank, .vga_sync,
    .vga_r, .vga_g, .vga_b,
    .cycle (color_cycle), .end_of_frame
  );

  assign ledg = 8'(instr);

endmodule
