// rammer: copies the parameter RAM into the working parameter registers.
//
// On a load pulse it reads rows 0 to 13 of the parameter RAM, one per cycle,
// and assembles them: rows 2n and 2n+1 are the high and low 18 bits of a
// 36-bit value, rows 8 and 9 carry the 10-bit leap intervals. When the last
// row is in, the new set is copied to params and generate pulses for one
// cycle; the window generator restarts on that pulse.
//
// Interface: load (pulse), read port of the parameter RAM (raddr out;
// rdata and raddr_q in, one cycle of latency), params (registered), busy,
// generate. Timing: generate comes 16 edges after the load edge. A load
// during a copy is ignored. Reset values are a default view (a from -2 to
// 2, b from -1.5 to 1.5, c = -0.833 - 0.232i) taken from the design's
// built-in preset. The row map follows the design; the sequencing is this
// design's own, since the design gives only the rammer's purpose.
module rammer
  import ifv_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  output logic [3:0]   raddr,
  input  logic [3:0]   raddr_q,
  input  logic [17:0]  rdata,
  output frac_params_t params,
  output logic         busy,
  output logic         generate_o
);

  localparam int ROWS = 14;

  logic         issuing, capture, publish;
  logic [3:0]   cnt;
  frac_params_t shadow;

  // a read issued in one cycle is captured in the next
  always_ff @(posedge clk) begin
    if (rst) begin
      issuing    <= 1'b0;
      capture    <= 1'b0;
      cnt        <= '0;
      generate_o <= 1'b0;
      publish    <= 1'b0;
      params     <= '{a_min:  36'shF80000000, a_diff: 36'sh000666666, a_leap: 10'd2,
                      b_min:  36'shFA0000000, b_diff: 36'sh000666666, b_leap: 10'd2,
                      c_re:   36'shFCA8F5C29, c_im:   36'shFF125460B};
    end else begin
      generate_o <= 1'b0;
      capture    <= issuing;
      if (load && !busy) begin
        issuing <= 1'b1;
        cnt     <= '0;
      end else if (issuing) begin
        if (cnt == 4'(ROWS - 1)) issuing <= 1'b0;
        else                     cnt     <= cnt + 1'b1;
      end
      if (capture) begin
        unique case (raddr_q)
          4'd0:  shadow.a_min[35:18]  <= rdata;
          4'd1:  shadow.a_min[17:0]   <= rdata;
          4'd2:  shadow.b_min[35:18]  <= rdata;
          4'd3:  shadow.b_min[17:0]   <= rdata;
          4'd4:  shadow.a_diff[35:18] <= rdata;
          4'd5:  shadow.a_diff[17:0]  <= rdata;
          4'd6:  shadow.b_diff[35:18] <= rdata;
          4'd7:  shadow.b_diff[17:0]  <= rdata;
          4'd8:  shadow.a_leap        <= rdata[9:0];
          4'd9:  shadow.b_leap        <= rdata[9:0];
          4'd10: shadow.c_re[35:18]   <= rdata;
          4'd11: shadow.c_re[17:0]    <= rdata;
          4'd12: shadow.c_im[35:18]   <= rdata;
          4'd13: shadow.c_im[17:0]    <= rdata;
          default: ;
        endcase
      end
      // once the last row has landed in the shadow set, publish it
      publish <= capture && (raddr_q == 4'(ROWS - 1));
      if (publish) begin
        params     <= shadow;
        generate_o <= 1'b1;
      end
    end
  end

  assign raddr = cnt;
  assign busy  = issuing || capture || publish;

endmodule
