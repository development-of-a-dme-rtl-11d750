// 50 us delay: divide-by-DELAY_COUNT counter and delayed-clock-enable latch.
//
// While pp_seq is low the counter and the latch are held clear. From the
// first clock with pp_seq high the counter counts distance-clock periods;
// when DELAY_COUNT of them have passed the latch sets and dlyd_clk_ena stays
// high until pp_seq falls, letting the 0.01 nm clock reach the distance
// counter. dlyd_clk_ena rises DELAY_COUNT clocks after pp_seq rises.
// 400 periods of 8.09127 MHz are 49.436 us, slightly short of 50 us, as in the
// original design; the count is a parameter.
module delay_50us #(
  parameter int unsigned DELAY_COUNT = 400
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pp_seq,
  output logic dlyd_clk_ena
);

  localparam int unsigned CW = $clog2(DELAY_COUNT);

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q        <= '0;
      dlyd_clk_ena <= 1'b0;
    end else if (!pp_seq) begin
      cnt_q        <= '0;
      dlyd_clk_ena <= 1'b0;
    end else if (!dlyd_clk_ena) begin
      cnt_q <= cnt_q + CW'(1);
      if (cnt_q == CW'(DELAY_COUNT - 1)) dlyd_clk_ena <= 1'b1;
    end
  end

endmodule
