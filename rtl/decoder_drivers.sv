// Distance display: five decoder drivers.
//
// Drives the five seven-segment digits (hundreds .. hundredths of a nautical
// mile) from the displayed distance. The hundreds decoder has its ripple-blank
// input grounded and passes its ripple-blank output to the tens decoder, so a
// leading zero in the first digit, and in the second when the first is also
// blank, is not shown; the three lower digits always show. Combinational.
// As in the original design; there is no decimal point output.
// Interface: dist_in (five BCD decades) in, seg_n[4] = hundreds .. seg_n[0] =
// hundredths out, each {a..g} active low.
module decoder_drivers
  import dme_pkg::*;
(
  input  dist_t dist_in,
  output seg_t  seg_n [5]
);

  logic rb_hundreds_n, rb_tens_n;
  logic [2:0] rb_low_n;

  bcd_7seg_decoder u_hundreds (.bcd(dist_in.hundreds),   .rbi_n(1'b0),          .seg_n(seg_n[4]), .rbo_n(rb_hundreds_n));
  bcd_7seg_decoder u_tens     (.bcd(dist_in.tens),       .rbi_n(rb_hundreds_n), .seg_n(seg_n[3]), .rbo_n(rb_tens_n));
  bcd_7seg_decoder u_units    (.bcd(dist_in.units),      .rbi_n(1'b1),          .seg_n(seg_n[2]), .rbo_n(rb_low_n[2]));
  bcd_7seg_decoder u_tenths   (.bcd(dist_in.tenths),     .rbi_n(1'b1),          .seg_n(seg_n[1]), .rbo_n(rb_low_n[1]));
  bcd_7seg_decoder u_hundrths (.bcd(dist_in.hundredths), .rbi_n(1'b1),          .seg_n(seg_n[0]), .rbo_n(rb_low_n[0]));

  // Blanking outputs below the hundreds digit have no further use.
  logic unused_rb;
  assign unused_rb = rb_tens_n & (&rb_low_n);

endmodule
