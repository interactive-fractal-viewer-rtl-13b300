// ifm_wrapper: one IFM plus the small state machine that drives it.
//
// The IFM controller does not handle the IFM's clear and start signals
// directly; it only gives each wrapper two commands. "assign" hands the
// wrapper the tuple on tuple_in (honoured only while ready is high);
// "retire" says the result has been copied out (honoured only while done is
// high). The wrapper then clears its IFM and, once the IFM is back in its
// wait state, reports ready again.
//
// States: RESET (IFM cleared, we=0) -> WAIT (IFM starting up, computing or
// idle). In WAIT the outputs follow the IFM: ready while it waits for data,
// done while it holds a result. retire returns to RESET.
// Timing: retire edge -> RESET for one cycle -> the IFM needs one more edge
// to reach its wait state, so ready is back two edges after retire.
// For a point with count k retired as soon as it is done, ready returns
// k + 4 edges after the assign edge.
// The command names and exact cycle counts are this design's own choices;
// the design fixes only that a wrapper per IFM translates controller
// commands into IFM control.
module ifm_wrapper
  import ifv_pkg::*;
#(
  parameter int MAX_IT = MAX_ITER
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    assign_i,
  input  logic    retire,
  input  tuple_t  tuple_in,
  input  fix_t    c_re,
  input  fix_t    c_im,
  output result_t result,
  output logic    ready,
  output logic    done
);

  typedef enum logic {W_RESET, W_WAIT} wstate_t;
  wstate_t state;
  logic    ifm_ready, ifm_done;

  always_ff @(posedge clk) begin
    if (rst) state <= W_RESET;
    else unique case (state)
      W_RESET: state <= W_WAIT;
      W_WAIT:  if (retire && ifm_done) state <= W_RESET;
      default: state <= W_RESET;
    endcase
  end

  assign ready = (state == W_WAIT) && ifm_ready;
  assign done  = (state == W_WAIT) && ifm_done;

  ifm #(.MAX_IT(MAX_IT)) u_ifm (
    .clk,
    .clr     (state == W_RESET),
    .start   (assign_i && ready),
    .tuple_in,
    .c_re,
    .c_im,
    .result,
    .ready   (ifm_ready),
    .done    (ifm_done)
  );

endmodule
