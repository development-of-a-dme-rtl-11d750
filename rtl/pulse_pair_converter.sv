// BCD to pulse pair converter.
//
// Turns a five-decade distance into the DME analog-distance pulse pair, all on
// the 8.09127 MHz distance clock, whose period is the two-way propagation time
// of 0.01 nm. Each PRF period (25 Hz) the sequence flip-flop rises and P1
// fires; P1 loads the distance counter; after the 400-clock delay the counter
// counts down, and its final borrow fires P2, which ends the sequence. P2
// rises DELAY_COUNT + D + 1 clocks after P1 for a distance of D hundredths of
// a nautical mile (401 + D by default: 49.56 us + 12.359 us/nm, within
// 0.036 nm of the 50 us + 12.359 us/nm standard). pp_out is P1 OR P2, the
// logic-level form of the pulse pair that the output interface drives at
// 12 V. Both pulses are PULSE_W clocks (7 us) wide. The partitioning and all
// numbers follow the original design; the 12 V open-collector output stage
// itself is analog and left outside.
module pulse_pair_converter
  import dme_pkg::*;
#(
  parameter int unsigned PRF_DIV     = 323651,
  parameter int unsigned PULSE_W     = 57,
  parameter int unsigned DELAY_COUNT = 400
) (
  input  logic  clk,
  input  logic  rst_n,
  input  dist_t dist_in,
  output logic  p1,
  output logic  p2,
  output logic  pp_out,
  output logic  pp_seq
);

  logic dlyd_clk_ena, p2_trig;

  prf_p1_gen #(.PRF_DIV(PRF_DIV), .PULSE_W(PULSE_W)) u_prf (
    .clk, .rst_n, .p2, .pp_seq, .p1
  );

  delay_50us #(.DELAY_COUNT(DELAY_COUNT)) u_dly (
    .clk, .rst_n, .pp_seq, .dlyd_clk_ena
  );

  distance_counter_p2 #(.PULSE_W(PULSE_W)) u_dcnt (
    .clk, .rst_n, .pp_seq, .p1, .dlyd_clk_ena, .dist_in, .p2_trig, .p2
  );

  // The borrow itself is only needed inside the distance counter.
  logic unused_trig;
  assign unused_trig = p2_trig;

  // NOR gate and inverter of the output interface: P1 OR P2
  assign pp_out = p1 || p2;

endmodule
