// ifv_pkg: types and constants shared by the fractal viewer.
//
// Real numbers are 36-bit two's-complement fixed point with 6 integer bits
// and 30 fraction bits (Q6.30), the width of the FPGA's embedded multipliers.
// The screen is 640 x 480; x needs 10 bits, y 9 bits, and a breakaway count
// k is 8 bits wide with iterations capped at 127. These numbers follow the
// design description. The window_t / tuple_t groupings are this design's own.
package ifv_pkg;

  localparam int FIX_W    = 36;              // fixed-point word width
  localparam int FRAC_W   = 30;              // bits right of the radix point
  localparam int LEAP_W   = 10;              // leap interval width
  localparam int X_W      = 10;
  localparam int Y_W      = 9;
  localparam int K_W      = 8;               // breakaway count width
  localparam int SCREEN_W = 640;
  localparam int SCREEN_H = 480;
  localparam int MAX_ITER = 127;             // iteration cap
  localparam int NUM_IFM  = 4;               // parallel IFMs

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic [LEAP_W-1:0]       leap_t;
  typedef logic [X_W-1:0]          xcoord_t;
  typedef logic [Y_W-1:0]          ycoord_t;
  typedef logic [K_W-1:0]          count_t;

  // |z|^2 escape threshold, 4.0 in Q6.30
  localparam logic [FIX_W+5:0] ESCAPE_MAG2 = 42'(4) << FRAC_W;

  // Window and Julia constant: everything one image needs
  typedef struct packed {
    fix_t  a_min;
    fix_t  a_diff;
    leap_t a_leap;
    fix_t  b_min;
    fix_t  b_diff;
    leap_t b_leap;
    fix_t  c_re;
    fix_t  c_im;
  } frac_params_t;

  // One sample point: screen position and its complex value a + bi
  typedef struct packed {
    xcoord_t x;
    ycoord_t y;
    fix_t    a;
    fix_t    b;
  } tuple_t;

  // One result: screen position and breakaway count
  typedef struct packed {
    xcoord_t x;
    ycoord_t y;
    count_t  k;
  } result_t;

  // Instruction register bit fields (bit 0 = reset ... bits 7:6 = preset)
  typedef struct packed {
    logic [1:0] fract;    // 7:6 parameter source / preset select
    logic       refresh;  // 5   load parameters from the parameter RAM
    logic [2:0] color;    // 4:2 color scheme
    logic       iterate;  // 1   color cycling enable
    logic       reset;    // 0   hold the fractal engine in reset
  } instr_t;

endpackage
