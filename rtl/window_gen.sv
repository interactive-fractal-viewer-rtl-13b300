// window_gen: maps every screen pixel to a point of the complex plane.
//
// Two differential counters do the work: the a counter walks x from 0 to
// WIDTH-1 along a row, the b counter walks y from 0 to HEIGHT-1. When the a
// counter is at its maximum, a step reloads a_min and steps b instead, so the
// pixels come out left to right, one row after another, starting at the top
// row (y = 0, b = b_min). Each pixel is delivered exactly once.
//
// Interface:
//   init      (the block diagram's reset) restart the window with the given
//             parameters; valid rises on the next cycle
//   next_val  the consumer takes the current tuple; the next one is shown
//             one cycle later
//   tuple     current (x, y, a, b); valid says it has not been taken yet
//   at_max    every tuple of the window has been taken
// Parameters a_* and b_* must be stable from init to the end of the window.
// Following the design, only additions and comparisons are used. Top-row
// first order and the exactly-once end condition are this design's choices.
module window_gen
  import ifv_pkg::*;
#(
  parameter int WIDTH  = SCREEN_W,
  parameter int HEIGHT = SCREEN_H
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   init,
  input  logic   next_val,
  input  fix_t   a_min,
  input  fix_t   a_diff,
  input  leap_t  a_leap,
  input  fix_t   b_min,
  input  fix_t   b_diff,
  input  leap_t  b_leap,
  output tuple_t tuple,
  output logic   valid,
  output logic   at_max
);

  logic [9:0] x_cnt, y_cnt;
  logic       a_at_max, b_at_max, a_ready, b_ready;
  logic       step, a_init, a_next, b_next;
  logic       finished;
  fix_t       a_val, b_val;

  assign valid  = a_ready && b_ready && !finished;
  assign at_max = finished;
  assign step   = valid && next_val;
  assign b_next = step && a_at_max && !b_at_max;
  assign a_next = step && !a_at_max;
  assign a_init = init || b_next;

  always_ff @(posedge clk) begin
    if (rst || init)                 finished <= 1'b0;
    else if (step && a_at_max && b_at_max) finished <= 1'b1;
  end

  diff_counter #(.V_W(FIX_W), .C_W(10), .L_W(LEAP_W)) u_a (
    .clk, .rst, .init(a_init), .next_val(a_next),
    .v_min(a_min), .v_diff(a_diff), .v_leap(a_leap),
    .max_itr(10'(WIDTH - 1)),
    .v_out(a_val), .c_out(x_cnt), .at_max(a_at_max), .ready(a_ready)
  );

  diff_counter #(.V_W(FIX_W), .C_W(10), .L_W(LEAP_W)) u_b (
    .clk, .rst, .init, .next_val(b_next),
    .v_min(b_min), .v_diff(b_diff), .v_leap(b_leap),
    .max_itr(10'(HEIGHT - 1)),
    .v_out(b_val), .c_out(y_cnt), .at_max(b_at_max), .ready(b_ready)
  );

  assign tuple.x = xcoord_t'(x_cnt);
  assign tuple.y = ycoord_t'(y_cnt);
  assign tuple.a = a_val;
  assign tuple.b = b_val;

endmodule
