// DME simulator: generates the analog-distance pulse pair of an airborne DME.
//
// The output pulse pair (p1, p2, and pp_out = p1 OR p2) repeats at 25 Hz and
// its spacing encodes a distance: 50 us plus 12.359 us per nautical mile, the
// two-way radio propagation time. The distance comes either from four
// thumbwheel decades (static mode, rate selector at digital distance, 0.1 nm
// steps) or from an up/down range counter that "flies" inbound or outbound at
// 60 .. 420 KTS in 60 KT steps, doubled by the X2 switch, in 0.01 nm steps
// (dynamic mode). Flying inbound through zero turns the aircraft outbound
// (station fly-over). The selected distance is shown on five seven-segment
// digits with leading-zero blanking.
//
// Two clocks: clk_rate (140 kHz) runs the range generator, clk_dme
// (8.09127 MHz, one period per 0.01 nm) runs the pulse pair converter. The
// displayed distance crosses between them through a bus synchroniser.
// rst_n is asynchronous, active low, and is synchronised into each domain.
// Switches and pushbuttons are asynchronous levels. Partitioning and every
// number follow the original design; the synchronisers and reset are this design's.
module dme_simulator
  import dme_pkg::*;
#(
  parameter int unsigned PRF_DIV     = 323651,
  parameter int unsigned PULSE_W     = 57,
  parameter int unsigned DELAY_COUNT = 400
) (
  input  logic      clk_rate,
  input  logic      clk_dme,
  input  logic      rst_n,
  input  thumb_t    thumb,
  input  rate_pos_e rate_pos,
  input  logic      rate_x2,
  input  logic      pb_inbound,
  input  logic      pb_outbound,
  input  logic      pb_preset,
  output seg_t      seg_n [5],
  output logic      lamp_inbound,
  output logic      lamp_outbound,
  output dist_t     distance,
  output logic      zero_dst,
  output logic      p1,
  output logic      p2,
  output logic      pp_out,
  output logic      pp_seq
);

  logic   rst_rate_n, rst_dme_n;
  dist_t  range_count, dist_dme;
  thumb_t upper;

  reset_sync u_rst_rate (.clk(clk_rate), .rst_n_in(rst_n), .rst_n_out(rst_rate_n));
  reset_sync u_rst_dme  (.clk(clk_dme),  .rst_n_in(rst_n), .rst_n_out(rst_dme_n));

  // Inbound/outbound range generator
  range_generator u_range (
    .clk(clk_rate), .rst_n(rst_rate_n),
    .rate_pos, .rate_x2, .pb_inbound, .pb_outbound, .pb_preset, .thumb,
    .count(range_count), .lamp_inbound, .lamp_outbound, .zero_dst
  );

  // Distance selection multiplexer and display
  output_mux u_mux (
    .sel_a_n(rate_pos != RATE_DIGITAL),
    .a(thumb),
    .b({range_count.hundreds, range_count.tens, range_count.units, range_count.tenths}),
    .y(upper)
  );

  assign distance = {upper, range_count.hundredths};

  decoder_drivers u_disp (.dist_in(distance), .seg_n);

  // BCD to pulse pair converter
  bus_sync #(.W($bits(dist_t))) u_xfer (
    .clk(clk_dme), .rst_n(rst_dme_n), .d(distance), .q(dist_dme)
  );

  pulse_pair_converter #(
    .PRF_DIV(PRF_DIV), .PULSE_W(PULSE_W), .DELAY_COUNT(DELAY_COUNT)
  ) u_conv (
    .clk(clk_dme), .rst_n(rst_dme_n), .dist_in(dist_dme),
    .p1, .p2, .pp_out, .pp_seq
  );

endmodule
