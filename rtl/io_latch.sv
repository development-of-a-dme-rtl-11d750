// Inbound/outbound latch.
//
// A set/reset latch (here a flip-flop in the 140 kHz domain) that remembers the
// direction of flight and steers the rate clock: in the inbound state each
// rate_tick becomes a count-down pulse (cnt_dn), in the outbound state a
// count-up pulse (cnt_up). The outbound pushbutton, or the zero-distance
// borrow from the range counter while flying inbound, sets it outbound; the
// inbound pushbutton sets it inbound. It drives the two indicator lamps.
// Inputs are synchronous one-cycle or level signals; the new state applies
// from the next clock. Outbound wins when both are requested, and reset
// selects outbound: both are choices of this design.
module io_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic pb_inbound,
  input  logic pb_outbound,
  input  logic zero_dst,
  input  logic rate_tick,
  output logic cnt_up,
  output logic cnt_dn,
  output logic lamp_inbound,
  output logic lamp_outbound
);

  logic inbound_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       inbound_q <= 1'b0;
    else if (pb_outbound || zero_dst) inbound_q <= 1'b0;
    else if (pb_inbound)              inbound_q <= 1'b1;
  end

  assign cnt_dn        = rate_tick &&  inbound_q;
  assign cnt_up        = rate_tick && !inbound_q;
  assign lamp_inbound  =  inbound_q;
  assign lamp_outbound = !inbound_q;

  // the counter is never told to count both ways at once
  a_one_direction: assert property (@(posedge clk) disable iff (!rst_n) !(cnt_up && cnt_dn));

endmodule
