// BCD to seven-segment decoder driver with ripple blanking.
//
// One decoder-driver package of the distance display. The segment outputs are
// open-collector style, active low: a 0 grounds the lamp filament and lights
// the segment. Segment order is {a,b,c,d,e,f,g}. The glyphs are the classic
// TTL ones (6 without its top bar, 9 without its bottom bar).
//
// Ripple blanking: when rbi_n is low and the digit is 0, all segments go dark
// and rbo_n goes low, so the next lower digit can blank its own leading zero.
// Otherwise rbo_n is high. Purely combinational.
//
// The truth table follows the original design; codes 10..15, which it does not list,
// blank the digit (a choice of this design).
module bcd_7seg_decoder
  import dme_pkg::*;
(
  input  bcd_t bcd,
  input  logic rbi_n,
  output seg_t seg_n,
  output logic rbo_n
);

  always_comb begin
    rbo_n = 1'b1;
    unique case (bcd)
      4'd0: begin
        if (!rbi_n) begin
          seg_n = 7'b111_1111;
          rbo_n = 1'b0;
        end else begin
          seg_n = 7'b000_0001;
        end
      end
      4'd1: seg_n = 7'b100_1111;
      4'd2: seg_n = 7'b001_0010;
      4'd3: seg_n = 7'b000_0110;
      4'd4: seg_n = 7'b100_1100;
      4'd5: seg_n = 7'b010_0100;
      4'd6: seg_n = 7'b110_0000;
      4'd7: seg_n = 7'b000_1111;
      4'd8: seg_n = 7'b000_0000;
      4'd9: seg_n = 7'b000_1100;
      default: seg_n = 7'b111_1111;
    endcase
  end

endmodule
