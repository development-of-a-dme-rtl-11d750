// X1/X2 rate control: divides the 140 kHz rate clock by 100 or 50.
//
// Same chain as the discrete circuit, written with clock enables in the
// 140 kHz domain: gate A passes the clock only while the rate selector is
// neither in digital distance nor at 0 KTS (enable); a divide-by-2 stage
// makes 70 kHz; a selector takes 70 kHz (X1) or the undivided 140 kHz (X2);
// a divide-by-5 stage and a divide-by-10 stage follow. The output, tick, is a
// one-clock pulse at 1.4 kHz (X1) or 2.8 kHz (X2), i.e. one pulse every 100 or
// 50 enabled clocks. Changing x2 takes effect at once; the counters keep
// their state. Dropping enable freezes the chain. The division chain follows
// the original design; producing one-clock pulses rather than a symmetrical
// square wave is a choice of this synchronous version.
module rate_control (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic x2,
  output logic tick
);

  logic       div2_q;
  logic [2:0] div5_q;
  logic [3:0] div10_q;
  logic       t70, tsel, t5;

  assign t70  = enable && div2_q;
  assign tsel = x2 ? enable : t70;
  assign t5   = tsel && (div5_q == 3'd4);
  assign tick = t5 && (div10_q == 4'd9);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div2_q  <= 1'b0;
      div5_q  <= '0;
      div10_q <= '0;
    end else begin
      if (enable) div2_q <= !div2_q;
      if (tsel)   div5_q <= (div5_q == 3'd4) ? 3'd0 : div5_q + 3'd1;
      if (t5)     div10_q <= (div10_q == 4'd9) ? 4'd0 : div10_q + 4'd1;
    end
  end

endmodule
