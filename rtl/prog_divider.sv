// Programmable divider: maximal-sequence shift register with short-cycle load.
//
// Three cascaded 4-bit shift-register counters form one 12-stage register.
// Each enabled clock shifts it one place from P1 toward P12 and feeds P1 with
// the exclusive OR of the TAPS stages (P5, P8, P9 and P12 by default, a
// maximal-length feedback: without loading it steps through all 4095 non-zero
// states). A detector for the all-ones state, which occurs once per sequence,
// provides the output; on the enabled clock after it the register is loaded
// with the program inputs instead of shifting. A program therefore divides by
// one plus the number of shifts from the program to all ones, anywhere from 2
// to 4095. The all-zero state is never reached.
//
// Interface: clk_en is the input clock (one-clock pulses), prog[11] = P1 ..
// prog[0] = P12, tick = clk_en while the register holds all ones, i.e. one
// pulse every N input pulses. Reset puts all ones in the register so that the
// first input pulse loads the program.
//
// The stage count and load-on-all-ones scheme follow the original design. Its
// feedback taps were not published with it; TAPS is the only XOR feedback
// that reproduces its whole programming table.
module prog_divider #(
  parameter int unsigned          STAGES = 12,
  parameter logic [STAGES-1:0]    TAPS   = 12'b0000_1001_1001
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_en,
  input  logic [STAGES-1:0] prog,
  output logic              tick
);

  logic [STAGES-1:0] sr_q;
  logic              all_ones, fb;

  assign all_ones = &sr_q;
  assign fb       = ^(sr_q & TAPS);
  assign tick     = clk_en && all_ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr_q <= '1;
    else if (clk_en) begin
      if (all_ones)    sr_q <= prog;
      else             sr_q <= {fb, sr_q[STAGES-1:1]};
    end
  end

endmodule
