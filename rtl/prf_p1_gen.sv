// PRF oscillator, pulse pair sequence flip-flop and P1 generator.
//
// The pulse repetition oscillator is a counter of the 8.09127 MHz clock that
// marks the fall of its output once every PRF_DIV clocks (323651 by default,
// 25 Hz, inside the 5 to 30 pulse pairs per second the output standard
// allows). That fall sets the pulse pair sequence flip-flop (pp_seq) and
// fires the P1 one-shot; P2 resets pp_seq at the end of the sequence. P1 is
// PULSE_W clocks wide (57 = 7 us). pp_seq and p1 both rise on the clock after
// the PRF fall. The first PRF fall comes PRF_DIV clocks after reset.
//
// The 25 Hz rate, the 7 us width and the sequence flip-flop ended by P2
// follow the original design. Building the oscillator as a counter of the
// distance clock, instead of a free-running astable, and setting the flip-flop
// rather than toggling it, are choices of this design.
module prf_p1_gen #(
  parameter int unsigned PRF_DIV = 323651,
  parameter int unsigned PULSE_W = 57
) (
  input  logic clk,
  input  logic rst_n,
  input  logic p2,
  output logic pp_seq,
  output logic p1
);

  localparam int unsigned CW = $clog2(PRF_DIV);

  logic [CW-1:0] prf_q;
  logic          prf_fall;

  assign prf_fall = (prf_q == CW'(PRF_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prf_q  <= '0;
      pp_seq <= 1'b0;
    end else begin
      prf_q <= prf_fall ? '0 : prf_q + CW'(1);
      if (prf_fall) pp_seq <= 1'b1;
      else if (p2)  pp_seq <= 1'b0;
    end
  end

  // P1 always lies inside its pulse pair sequence
  a_p1_in_seq: assert property (@(posedge clk) disable iff (!rst_n) p1 |-> pp_seq);

  one_shot #(.WIDTH(PULSE_W)) u_p1 (.clk, .rst_n, .trig(prf_fall), .pulse(p1));

endmodule
