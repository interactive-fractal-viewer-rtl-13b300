// fractal_engine: the compute half of the viewer.
//
// A window generator enumerates the screen's pixels as (x, y, a, b) tuples
// and the IFM controller spreads them over NUM_IFM iterative function
// modules; the result stream is (x, y, k) with a write-enable, at most one
// per cycle, in completion order (not pixel order).
//
// Interface:
//   start   one-cycle pulse: restart the window with params and clear the
//           controller and its IFMs (results in flight are dropped)
//   params  window and Julia constant; hold stable while busy
//   result, we   output stream towards the frame buffer
//   frame_done   every pixel of the window has been written
// Worst case (all points reach the 127-iteration cap) the engine delivers
// about four results per 131 to 133 cycles.
// The composition follows the design; frame_done and clearing the
// controller on start are this design's own.
module fractal_engine
  import ifv_pkg::*;
#(
  parameter int WIDTH  = SCREEN_W,
  parameter int HEIGHT = SCREEN_H,
  parameter int N      = NUM_IFM,
  parameter int MAX_IT = MAX_ITER
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  frac_params_t params,
  output result_t      result,
  output logic         we,
  output logic         frame_done
);

  tuple_t tuple;
  logic   valid, next_val, at_max, idle;

  window_gen #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_win (
    .clk, .rst,
    .init     (start),
    .next_val (next_val),
    .a_min    (params.a_min),
    .a_diff   (params.a_diff),
    .a_leap   (params.a_leap),
    .b_min    (params.b_min),
    .b_diff   (params.b_diff),
    .b_leap   (params.b_leap),
    .tuple, .valid, .at_max
  );

  ifm_controller #(.N(N), .MAX_IT(MAX_IT)) u_ctrl (
    .clk,
    .rst      (rst || start),
    .tuple_in (tuple),
    .valid_in (valid),
    .next_val (next_val),
    .c_re     (params.c_re),
    .c_im     (params.c_im),
    .result, .we, .idle
  );

  assign frame_done = at_max && idle && !we;

endmodule
