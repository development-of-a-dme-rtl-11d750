// Distance counter and P2 generator.
//
// Five cascaded BCD down-counting decades. While pp_seq is low they are held
// at zero. While P1 is high they load the distance (in 0.01 nm, one count per
// period of the 8.09127 MHz clock). Once the delayed clock is enabled they
// count down one per clock; the count after 000.00 borrows through all five
// decades (p2_trig, the counter wraps to 999.99) and fires the P2 one-shot,
// PULSE_W clocks wide. With the delay stage this puts the rise of P2
// DELAY_COUNT + D + 1 clocks after the rise of P1 for a distance of D
// hundredths: 401 + D clocks, about 50 us plus 12.359 us per nautical mile.
// Loading, clearing and the borrow-triggered P2 follow the original design;
// the exact clock count is that of this synchronous version.
module distance_counter_p2
  import dme_pkg::*;
#(
  parameter int unsigned PULSE_W = 57
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pp_seq,
  input  logic  p1,
  input  logic  dlyd_clk_ena,
  input  dist_t dist_in,
  output logic  p2_trig,
  output logic  p2
);

  localparam int unsigned DIGITS = 5;

  bcd_t digit_q [DIGITS];   // [0] = hundredths
  bcd_t digit_d [DIGITS];

  always_comb begin
    logic borrow;
    borrow = 1'b1;
    for (int i = 0; i < DIGITS; i++) begin
      digit_d[i] = digit_q[i];
      if (borrow) begin
        if (digit_q[i] == 4'd0) digit_d[i] = 4'd9;
        else begin
          digit_d[i] = digit_q[i] - 4'd1;
          borrow     = 1'b0;
        end
      end
    end
    p2_trig = borrow && dlyd_clk_ena && pp_seq && !p1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIGITS; i++) digit_q[i] <= '0;
    end else if (!pp_seq) begin
      for (int i = 0; i < DIGITS; i++) digit_q[i] <= '0;
    end else if (p1) begin
      digit_q[0] <= dist_in.hundredths;
      digit_q[1] <= dist_in.tenths;
      digit_q[2] <= dist_in.units;
      digit_q[3] <= dist_in.tens;
      digit_q[4] <= dist_in.hundreds;
    end else if (dlyd_clk_ena) begin
      for (int i = 0; i < DIGITS; i++) digit_q[i] <= digit_d[i];
    end
  end

  // the count may only run out after loading has finished
  a_trig_after_load: assert property (@(posedge clk) disable iff (!rst_n) p2_trig |-> !p1);

  one_shot #(.WIDTH(PULSE_W)) u_p2 (.clk, .rst_n, .trig(p2_trig), .pulse(p2));

endmodule
