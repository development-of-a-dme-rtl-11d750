// Shared types and constants of the DME simulator.
//
// Distances are carried as five BCD decades, hundreds of nautical miles down to
// hundredths (000.00 .. 999.99 nm); one hundredth of a nautical mile is one
// period of the 8.09127 MHz distance clock (12.359 us of two-way radio
// propagation per nautical mile). The rate selector is an enumerated position
// of the nine-position rotary switch: digital (thumbwheel) distance, 0 KTS, and
// 60 .. 420 KTS in 60 KT steps; the X2 switch doubles the selected rate.
package dme_pkg;

  typedef logic [3:0] bcd_t;

  // Five-decade distance, most significant decade first.
  typedef struct packed {
    bcd_t hundreds;
    bcd_t tens;
    bcd_t units;
    bcd_t tenths;
    bcd_t hundredths;
  } dist_t;

  // Thumbwheel setting: four decades, 0.1 nm resolution.
  typedef struct packed {
    bcd_t hundreds;
    bcd_t tens;
    bcd_t units;
    bcd_t tenths;
  } thumb_t;

  typedef enum logic [3:0] {
    RATE_DIGITAL = 4'd0,
    RATE_0KT     = 4'd1,
    RATE_60KT    = 4'd2,
    RATE_120KT   = 4'd3,
    RATE_180KT   = 4'd4,
    RATE_240KT   = 4'd5,
    RATE_300KT   = 4'd6,
    RATE_360KT   = 4'd7,
    RATE_420KT   = 4'd8
  } rate_pos_e;

  // Segment vector order: {a, b, c, d, e, f, g}, 0 = segment lit.
  typedef logic [6:0] seg_t;

endpackage
