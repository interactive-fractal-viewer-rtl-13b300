// ifm: Iterative Function Module, the Julia set kernel.
//
// Given a start point z0 = a + bi and the Julia constant c, the module
// applies z <- z^2 + c once per clock cycle and reports the breakaway count
// k: the index of the first iterate whose squared magnitude exceeds 4, or
// MAX_ITER if none does within MAX_ITER iterations (the point is taken to be
// in the set). The square needs three real products:
//   PA = a*a, PB = b*b, PC = a*b
//   a' = PA - PB + c_re,  b' = 2*PC + c_im,  |z|^2 = PA + PB
// Numbers are Q6.30; products are 72 bits and bits 65:30 are kept.
//
// States (Moore): RESET -> WAIT (ready=1) -> COMPUTE -> DONE (done=1).
//   clr    returns to RESET from any state; RESET leaves when clr drops
//   start  in WAIT, latches (x, y, a, b) and begins iterating
// Timing: a point with count k stays k+1 cycles in COMPUTE, so done rises
// k+1 clock edges after the start edge. Results hold in DONE until clr.
//
// Following the design: the Q6.30 format, the three-multiplier datapath,
// the 127-iteration cap and the escape test |z|^2 > 4. This design's own
// choice: the escape test adds the squares at full width (bits 71:30) so an
// escaping iterate whose square no longer fits in 6 integer bits cannot wrap
// around and look small. The c_im term is added, as in the datapath diagram.
module ifm
  import ifv_pkg::*;
#(
  parameter int MAX_IT = MAX_ITER
) (
  input  logic    clk,
  input  logic    clr,
  input  logic    start,
  input  tuple_t  tuple_in,
  input  fix_t    c_re,
  input  fix_t    c_im,
  output result_t result,
  output logic    ready,
  output logic    done
);

  typedef enum logic [1:0] {S_RESET, S_WAIT, S_COMPUTE, S_DONE} state_t;
  state_t state;

  fix_t    za, zb;
  count_t  counter;
  xcoord_t x_q;
  ycoord_t y_q;

  logic signed [2*FIX_W-1:0] pa, pb, pc;
  fix_t  spa, spb, spc, a_next, b_next;
  logic [FIX_W+6:0] mag2;
  logic  escape, stop;

  assign pa  = za * za;
  assign pb  = zb * zb;
  assign pc  = za * zb;
  assign spa = pa[FRAC_W +: FIX_W];
  assign spb = pb[FRAC_W +: FIX_W];
  assign spc = pc[FRAC_W +: FIX_W];

  assign a_next = spa - spb + c_re;
  assign b_next = (spc <<< 1) + c_im;

  // squares are never negative: add them as unsigned, at full width
  assign mag2   = (FIX_W+7)'(pa[2*FIX_W-1:FRAC_W]) + (FIX_W+7)'(pb[2*FIX_W-1:FRAC_W]);
  assign escape = mag2 > (FIX_W+7)'(ESCAPE_MAG2);
  assign stop   = escape || (counter == count_t'(MAX_IT));

  always_ff @(posedge clk) begin
    if (clr) begin
      state   <= S_RESET;
      counter <= '0;
    end else begin
      unique case (state)
        S_RESET: state <= S_WAIT;
        S_WAIT: if (start) begin
          za      <= tuple_in.a;
          zb      <= tuple_in.b;
          x_q     <= tuple_in.x;
          y_q     <= tuple_in.y;
          counter <= '0;
          state   <= S_COMPUTE;
        end
        S_COMPUTE: if (stop) begin
          state <= S_DONE;
        end else begin
          za      <= a_next;
          zb      <= b_next;
          counter <= counter + 1'b1;
        end
        S_DONE: ;
        default: state <= S_RESET;
      endcase
    end
  end

  assign ready    = (state == S_WAIT);
  assign done     = (state == S_DONE);
  assign result.x = x_q;
  assign result.y = y_q;
  assign result.k = counter;

endmodule
