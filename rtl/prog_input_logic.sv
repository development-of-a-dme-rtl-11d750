// Programming input logic of the programmable rate divider.
//
// Decodes the rate selector position into the twelve program inputs P1..P12
// (prog[11] = P1 .. prog[0] = P12) of the shift-register divider, so that the
// 1.4 kHz rate clock is divided by 50400 / (rate in KTS): by 840, 420, 280,
// 210, 168, 140 or 120 for 60 .. 420 KTS, giving one 0.01 nm count per
// period at the selected ground speed. Each program bit is a small OR of
// switch positions, as in the gate-level version: the table below lists, per
// position, the bit pattern those gates produce. The pattern for each divisor
// follows the original design's programming table; positions digital and 0 KTS,
// where the rate clock is gated off, give all ones (divide by 1, unused).
// Combinational.
module prog_input_logic
  import dme_pkg::*;
(
  input  rate_pos_e   rate_pos,
  output logic [11:0] prog
);

  always_comb begin
    unique case (rate_pos)
      RATE_60KT:  prog = 12'b1101_0011_1100;  // divide by 840
      RATE_120KT: prog = 12'b0111_0111_0001;  // divide by 420
      RATE_180KT: prog = 12'b1000_0101_1110;  // divide by 280
      RATE_240KT: prog = 12'b0000_0001_1111;  // divide by 210
      RATE_300KT: prog = 12'b1000_1111_1110;  // divide by 168
      RATE_360KT: prog = 12'b1010_1100_0000;  // divide by 140
      RATE_420KT: prog = 12'b1011_0001_1000;  // divide by 120
      default:    prog = 12'hFFF;
    endcase
  end

endmodule
