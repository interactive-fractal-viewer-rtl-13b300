// param_select: chooses which parameter set the fractal engine draws.
//
// fract = 00 passes the set loaded from the parameter RAM; 01, 10 and 11
// select built-in presets that all show a from -2 to 2 and b from -1.5 to
// 1.5 (step 4/640 = 0x000666666 in Q6.30, leap interval 2) and differ in
// the Julia constant:
//   01  c = 0                       (the unit circle)
//   10  c = 0xFCA8F5C29 + 0xFF125460B i  (about -0.835 - 0.232i)
//   11  c = 0xFCA8F5C29 + 0xFFF25460B i  (about -0.835 - 0.013i)
// The output is registered, one cycle after fract or the loaded set change.
// The presets and the selection codes follow the design.
module param_select
  import ifv_pkg::*;
(
  input  logic         clk,
  input  logic [1:0]   fract,
  input  frac_params_t loaded,
  output frac_params_t params
);

  localparam fix_t  WIN_A_MIN = 36'shF80000000;   // -2.0
  localparam fix_t  WIN_B_MIN = 36'shFA0000000;   // -1.5
  localparam fix_t  WIN_DIFF  = 36'sh000666666;   // 0.00625
  localparam leap_t WIN_LEAP  = 10'd2;

  frac_params_t preset;

  always_comb begin
    preset = '{a_min: WIN_A_MIN, a_diff: WIN_DIFF, a_leap: WIN_LEAP,
               b_min: WIN_B_MIN, b_diff: WIN_DIFF, b_leap: WIN_LEAP,
               c_re: '0, c_im: '0};
    unique case (fract)
      2'b10: begin preset.c_re = 36'shFCA8F5C29; preset.c_im = 36'shFF125460B; end
      2'b11: begin preset.c_re = 36'shFCA8F5C29; preset.c_im = 36'shFFF25460B; end
      default: ;
    endcase
  end

  always_ff @(posedge clk)
    params <= (fract == 2'b00) ? loaded : preset;

endmodule
