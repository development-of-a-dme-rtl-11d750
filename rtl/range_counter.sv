// Up/down range counter: cascaded presettable BCD decades.
//
// Holds the simulated distance from 000.00 to 999.99 nm in five decades
// (hundreds down to hundredths). A cnt_up pulse adds 0.01 nm and a cnt_dn
// pulse subtracts 0.01 nm, each decade carrying or borrowing into the next as
// in a ripple cascade (all within one clock here). Counting down from 000.00
// produces the borrow out of the hundreds decade, zero_dst, a one-cycle pulse
// that tells the inbound/outbound latch the aircraft has passed over the
// station; the count then stays at 000.00 rather than wrapping to 999.99.
// Counting up from 999.99 wraps to 000.00 (a choice of this design).
//
// preset (level) loads the four thumbwheel decades and clears the hundredths
// on every clock while held. hold_hundredths, active in the digital-distance
// position, keeps the hundredths decade at zero. Preset wins over counting.
module range_counter
  import dme_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cnt_up,
  input  logic   cnt_dn,
  input  logic   preset,
  input  logic   hold_hundredths,
  input  thumb_t thumb,
  output dist_t  count,
  output logic   zero_dst
);

  localparam int unsigned DIGITS = 5;

  bcd_t digit_q [DIGITS];   // [0] = hundredths
  bcd_t digit_d [DIGITS];
  logic is_zero;

  always_comb begin
    logic carry, borrow;
    carry  = cnt_up && !cnt_dn;
    borrow = cnt_dn && !cnt_up;
    for (int i = 0; i < DIGITS; i++) begin
      digit_d[i] = digit_q[i];
      if (carry) begin
        if (digit_q[i] >= 4'd9) digit_d[i] = 4'd0;
        else begin
          digit_d[i] = digit_q[i] + 4'd1;
          carry      = 1'b0;
        end
      end else if (borrow) begin
        if (digit_q[i] == 4'd0) digit_d[i] = 4'd9;
        else begin
          digit_d[i] = digit_q[i] - 4'd1;
          borrow     = 1'b0;
        end
      end
    end
    // borrow still set here: the count was zero and a down pulse arrived
    is_zero = borrow;
  end

  assign zero_dst = is_zero && !preset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIGITS; i++) digit_q[i] <= '0;
    end else if (preset) begin
      digit_q[0] <= '0;
      digit_q[1] <= thumb.tenths;
      digit_q[2] <= thumb.units;
      digit_q[3] <= thumb.tens;
      digit_q[4] <= thumb.hundreds;
    end else begin
      if (!is_zero) begin
        for (int i = 0; i < DIGITS; i++) digit_q[i] <= digit_d[i];
      end
      if (hold_hundredths) digit_q[0] <= '0;
    end
  end

  // every decade stays a valid BCD digit (given BCD thumbwheels)
  a_valid_bcd: assert property (@(posedge clk) disable iff (!rst_n)
    (digit_q[0] <= 4'd9) && (digit_q[1] <= 4'd9) && (digit_q[2] <= 4'd9) &&
    (digit_q[3] <= 4'd9) && (digit_q[4] <= 4'd9));

  assign count = {digit_q[4], digit_q[3], digit_q[2], digit_q[1], digit_q[0]};

endmodule
