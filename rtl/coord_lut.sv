// coord_lut: the coordinate-breakaway lookup table, a frame buffer of
// 8-bit breakaway counts kept in the board's external 256K x 16 SRAM.
//
// Addressing: the pixel address is {y[8:0], x[9:0]} (19 bits). Its top 18
// bits select a 16-bit SRAM word and x[0] selects the byte lane (0 = low
// byte, 1 = high byte), so a 640 x 480 frame takes 300 KiB.
//
// Sharing the single SRAM port: the VGA side reads every pixel clock, the
// engine writes at most once per clock, and the SRAM does one access per
// clock. Two rules make this work:
//  * A read of an even pixel fetches the whole word and keeps the high byte
//    in a register; the odd pixel that follows is served from that register
//    without touching the SRAM. VGA reads therefore need the SRAM only every
//    other clock, which leaves room for the writes.
//  * Writes win over reads. A read that collides with a write is dropped
//    (read_missed pulses) and rv repeats its last value; the pixel is right
//    again on the next frame scan.
// A write to the word held in the register also updates the register.
//
// Timing: the SRAM is asynchronous, so rv is combinational from rx, ry, re
// in the same cycle (the VGA module registers it). A write is presented to
// the SRAM in the cycle we is high. The SRAM data bus is split into
// dq_o / dq_oe / dq_i; the board-level tristate buffer is outside this RTL.
// Following the design: address map, byte lanes, write priority and the
// high-byte register. This design's own choices: one clock for both sides,
// repeating the last value on a dropped read, updating the register on a
// write hit.
module coord_lut
  import ifv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // read side (VGA)
  input  xcoord_t     rx,
  input  ycoord_t     ry,
  input  logic        re,
  output count_t      rv,
  // write side (fractal engine)
  input  xcoord_t     wx,
  input  ycoord_t     wy,
  input  count_t      wv,
  input  logic        we,
  // status
  output logic        read_missed,
  output logic        cache_hit,
  // SRAM pins
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic        sram_we_n,
  output logic        sram_ce_n,
  output logic        sram_oe_n
);

  logic [18:0] raddr, waddr;
  logic        do_write, do_read;
  logic [17:0] hold_word;
  logic [7:0]  hold_byte;
  logic        hold_valid;
  count_t      rv_last;

  assign raddr = {ry, rx};
  assign waddr = {wy, wx};

  assign cache_hit   = re && raddr[0] && hold_valid && (hold_word == raddr[18:1]);
  assign do_write    = we;
  assign do_read     = re && !cache_hit && !do_write;
  assign read_missed = re && !cache_hit && do_write;

  always_comb begin
    if (cache_hit)    rv = hold_byte;
    else if (do_read) rv = raddr[0] ? sram_dq_i[15:8] : sram_dq_i[7:0];
    else              rv = rv_last;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_valid <= 1'b0;
      hold_word  <= '0;
      hold_byte  <= '0;
      rv_last    <= '0;
    end else begin
      rv_last <= rv;
      if (do_read && !raddr[0]) begin
        hold_valid <= 1'b1;
        hold_word  <= raddr[18:1];
        hold_byte  <= sram_dq_i[15:8];
      end
      if (do_write && waddr[0] && hold_valid && hold_word == waddr[18:1])
        hold_byte <= wv;
    end
  end

  assign sram_addr  = do_write ? waddr[18:1] : raddr[18:1];
  assign sram_dq_oe = do_write;
  assign sram_dq_o  = waddr[0] ? {wv, 8'h00} : {8'h00, wv};
  assign sram_ub_n  = !(do_read || (do_write && waddr[0]));
  assign sram_lb_n  = !(do_read || (do_write && !waddr[0]));
  assign sram_we_n  = !do_write;
  assign sram_oe_n  = !do_read;
  assign sram_ce_n  = 1'b0;

endmodule
