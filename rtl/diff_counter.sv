// diff_counter: differential counter for window generation.
//
// Walks a value v across a window using only additions: each step adds
// v_diff, and every leap cycle it adds v_diff + 1 LSB to make up for the
// precision lost when v_diff was rounded down. Alongside v it counts the
// pixel index c from 0 to max_itr. When c reaches max_itr the counter stops
// and raises at_max.
//
// Interface:
//   rst      power-on reset, returns to the idle (not ready) state
//   init     load v_min, clear c and the leap counter, raise ready
//            (the "reset" input of the block diagram)
//   next_val take one step; ignored while init is high or at_max is high
//   v_out, c_out  current value and index (registered)
//   ready    high from the first init onward
//   at_max   high while c_out == max_itr
// Timing: outputs change on the clock edge that samples init or next_val.
//
// Leap rule, as in the state diagram of the design: a step is a leap step
// when the leap counter equals v_leap; a leap step adds v_diff + 1 and clears
// the leap counter, any other step adds v_diff and increments it. The
// separate power-on reset is this design's own addition.
module diff_counter #(
  parameter int V_W = 36,
  parameter int C_W = 10,
  parameter int L_W = 10
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  init,
  input  logic                  next_val,
  input  logic signed [V_W-1:0] v_min,
  input  logic signed [V_W-1:0] v_diff,
  input  logic        [L_W-1:0] v_leap,
  input  logic        [C_W-1:0] max_itr,
  output logic signed [V_W-1:0] v_out,
  output logic        [C_W-1:0] c_out,
  output logic                  at_max,
  output logic                  ready
);

  logic [L_W-1:0] iter_count;
  logic           leap;

  assign leap   = (iter_count == v_leap);
  assign at_max = ready && (c_out == max_itr);

  always_ff @(posedge clk) begin
    if (rst) begin
      ready      <= 1'b0;
      v_out      <= '0;
      c_out      <= '0;
      iter_count <= '0;
    end else if (init) begin
      ready      <= 1'b1;
      v_out      <= v_min;
      c_out      <= '0;
      iter_count <= '0;
    end else if (ready && next_val && !at_max) begin
      c_out <= c_out + 1'b1;
      if (leap) begin
        v_out      <= v_out + v_diff + V_W'(1);
        iter_count <= '0;
      end else begin
        v_out      <= v_out + v_diff;
        iter_count <= iter_count + 1'b1;
      end
    end
  end

endmodule
