// Output multiplexer: four quad 2:1 multiplexers.
//
// Chooses, decade by decade, between the thumbwheel setting (A group) and the
// upper four decades of the up/down range counter (B group). sel_a_n low,
// which the rate selector produces in its digital-distance position, passes
// the thumbwheels; high passes the range counter. The hundredths decade is not
// multiplexed: the range counter holds it at zero in digital mode.
// Combinational. Structure and select polarity follow the original design.
module output_mux
  import dme_pkg::*;
(
  input  logic   sel_a_n,
  input  thumb_t a,
  input  thumb_t b,
  output thumb_t y
);

  assign y = sel_a_n ? b : a;

endmodule
