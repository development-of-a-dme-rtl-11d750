// Inbound/outbound range generator.
//
// Produces the "flying" distance. Runs entirely on the 140 kHz rate clock.
// The rate selector position and X2 switch pick the counting rate: the rate
// control divides the clock by 100 (X1) or 50 (X2) to 1.4 or 2.8 kHz, and the
// programmable shift-register divider, programmed by the position decoder,
// divides that by 50400 / (rate in KTS), so the range counter moves 0.01 nm
// per period: 5/3 Hz at 60 KTS up to 35/3 Hz at 420 KTS, or twice that with
// X2 (840 KTS). The inbound/outbound latch turns each rate pulse into a count
// down or up; reaching zero while inbound flips it to outbound.
//
// In the digital-distance and 0 KTS positions the rate clock is stopped; in
// digital distance the hundredths decade is held at zero. Preset loads the
// thumbwheels into the counter. The switch and pushbutton inputs are
// asynchronous and pass two-flip-flop synchronisers here (a choice of this
// design; the original design uses the switch levels directly).
module range_generator
  import dme_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  rate_pos_e rate_pos,
  input  logic      rate_x2,
  input  logic      pb_inbound,
  input  logic      pb_outbound,
  input  logic      pb_preset,
  input  thumb_t    thumb,
  output dist_t     count,
  output logic      lamp_inbound,
  output logic      lamp_outbound,
  output logic      zero_dst
);

  logic [3:0]  pos_raw;
  rate_pos_e   pos;
  logic        x2, pb_in, pb_out, preset;
  logic        gate_a, tick_100, rate_tick, cnt_up, cnt_dn;
  logic [11:0] prog;

  sync_2ff #(.W(8)) u_sync (
    .clk, .rst_n,
    .d({rate_pos, rate_x2, pb_inbound, pb_outbound, pb_preset}),
    .q({pos_raw, x2, pb_in, pb_out, preset})
  );
  assign pos = rate_pos_e'(pos_raw);

  // Gate A: rate clock only in a rate position above 0 KTS
  assign gate_a = (pos != RATE_DIGITAL) && (pos != RATE_0KT);

  rate_control u_rate (
    .clk, .rst_n, .enable(gate_a), .x2, .tick(tick_100)
  );

  prog_input_logic u_prog (.rate_pos(pos), .prog);

  prog_divider u_div (
    .clk, .rst_n, .clk_en(tick_100), .prog, .tick(rate_tick)
  );

  io_latch u_latch (
    .clk, .rst_n,
    .pb_inbound(pb_in), .pb_outbound(pb_out), .zero_dst, .rate_tick,
    .cnt_up, .cnt_dn, .lamp_inbound, .lamp_outbound
  );

  range_counter u_cnt (
    .clk, .rst_n, .cnt_up, .cnt_dn, .preset,
    .hold_hundredths(pos == RATE_DIGITAL), .thumb, .count, .zero_dst
  );

endmodule
