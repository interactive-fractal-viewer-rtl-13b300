// color_lut: the colorization table, breakaway count -> 30-bit RGB.
//
// A read-only table with 8 colour schemes of 256 entries each, indexed by
// {scheme, count}; entries are 10 bits per channel (R in 29:20, G in 19:10,
// B in 9:0) as the VGA DAC takes them. The table is computed rather than
// stored, from this rule: the count is folded into a 7-bit level t
// (t = count for count < 128, t = 255 - count above, so a shifting colour
// offset wraps without a jump), the level becomes a 10-bit intensity
// L = {t, t[6:4]}, and the scheme picks the channels:
//   0 grey (L, L, L)          1 blue (0, 0, L)       2 green (0, L, 0)
//   3 cyan (0, L, L)          4 red (L, 0, 0)        5 magenta (L, 0, L)
//   6 yellow (L, L, 0)        7 inverted grey (1023 - L on all three)
// The design gives the table's purpose, the 8-bit count and the 3-bit
// scheme select; it does not list the colours, so the schemes here are
// this design's own. Purely combinational.
module color_lut
  import ifv_pkg::*;
(
  input  count_t      count,
  input  logic [2:0]  scheme,
  output logic [29:0] rgb
);

  logic [6:0] t;
  logic [9:0] lvl;

  assign t   = count[7] ? ~count[6:0] : count[6:0];
  assign lvl = {t, t[6:4]};

  always_comb begin
    unique case (scheme)
      3'd0:    rgb = {lvl, lvl, lvl};
      3'd7:    rgb = {~lvl, ~lvl, ~lvl};
      default: rgb = {scheme[2] ? lvl : 10'd0,
                      scheme[1] ? lvl : 10'd0,
                      scheme[0] ? lvl : 10'd0};
    endcase
  end

endmodule
