// ifm_controller: spreads window tuples over NUM_IFM parallel IFMs and
// gathers their results.
//
// Points take anywhere from 1 to 128 iterations, so the IFMs finish out of
// order. The controller keeps them busy and serialises their results:
//  * Input buffer: two tuple registers in series. Stage 1 takes the window
//    generator's tuple whenever it is empty (next_val = stage 1 empty, so
//    the generator advances on the same edge); stage 0 refills from stage 1
//    whenever stage 0 is empty.
//  * Feeding: while stage 0 holds a tuple, it is assigned to the lowest
//    numbered ready IFM; only one IFM is assigned per cycle and the others
//    keep waiting for the following tuples.
//  * Collecting: the lowest numbered done IFM is retired each cycle, its
//    (x, y, k) copied into the output register with we = 1. With no done
//    IFM, we = 0 on the next cycle.
// Because stage 0 is refilled only once it is empty, assignments are at
// least two cycles apart. idle is high when both buffer stages are empty
// and every IFM is ready. Following the design: the two-stage input buffer,
// fixed-priority assignment and collection, one output register. The idle
// flag is this design's own.
module ifm_controller
  import ifv_pkg::*;
#(
  parameter int N      = NUM_IFM,
  parameter int MAX_IT = MAX_ITER
) (
  input  logic    clk,
  input  logic    rst,
  input  tuple_t  tuple_in,
  input  logic    valid_in,
  output logic    next_val,
  input  fix_t    c_re,
  input  fix_t    c_im,
  output result_t result,
  output logic    we,
  output logic    idle
);

  tuple_t s1, s0;
  logic   s1_v, s0_v;

  logic [N-1:0] ready, done, assign_v, retire_v;
  result_t      res [N];

  assign next_val = !s1_v;

  // fixed-priority pick of one ready IFM and one done IFM
  always_comb begin
    assign_v = '0;
    retire_v = '0;
    for (int i = N-1; i >= 0; i--) begin
      if (ready[i]) assign_v = N'(1) << i;
      if (done[i])  retire_v = N'(1) << i;
    end
    if (!s0_v) assign_v = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_v <= 1'b0;
      s0_v <= 1'b0;
    end else begin
      // stage 1 loads from the window generator when empty
      if (!s1_v && valid_in) begin
        s1   <= tuple_in;
        s1_v <= 1'b1;
      end
      // stage 0 loads from stage 1 when empty
      if (!s0_v && s1_v) begin
        s0   <= s1;
        s0_v <= 1'b1;
        s1_v <= 1'b0;
      end
      // stage 0 is consumed by an assignment
      if (s0_v && |assign_v) s0_v <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      we     <= 1'b0;
      result <= '0;
    end else begin
      we <= |retire_v;
      result <= '0;
      for (int i = 0; i < N; i++)
        if (retire_v[i]) result <= res[i];
    end
  end

  assign idle = !s1_v && !s0_v && (&ready);

  for (genvar i = 0; i < N; i++) begin : g_ifm
    ifm_wrapper #(.MAX_IT(MAX_IT)) u_wrap (
      .clk, .rst,
      .assign_i (assign_v[i]),
      .retire   (retire_v[i]),
      .tuple_in (s0),
      .c_re, .c_im,
      .result   (res[i]),
      .ready    (ready[i]),
      .done     (done[i])
    );
  end

  // at most one assignment and one retirement per cycle
  a_one_assign: assert property (@(posedge clk) disable iff (rst) $onehot0(assign_v));
  a_one_retire: assert property (@(posedge clk) disable iff (rst) $onehot0(retire_v));

endmodule
