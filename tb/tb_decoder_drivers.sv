// Testbench for decoder_drivers: random and hand-picked distances; checks
// which digits are blanked (a leading zero in the hundreds digit, and in the
// tens digit when the hundreds digit is blank) and that the other digits are
// lit with some segment pattern matching the same digit on a lone decoder.
module tb_decoder_drivers;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  dist_t dist_in;
  seg_t  seg_n [5];
  seg_t  ref_seg;
  bcd_t  ref_bcd;
  logic  ref_rbo;
  int    checks = 0, failures = 0;

  decoder_drivers dut (.dist_in, .seg_n);
  // reference decoder, ripple blank off, to get the unblanked glyph
  bcd_7seg_decoder u_ref (.bcd(ref_bcd), .rbi_n(1'b1), .seg_n(ref_seg), .rbo_n(ref_rbo));

  task automatic check_one(dist_t d);
    bcd_t dg [5];
    bit   blank [5];
    dist_in = d;
    dg = '{d.hundredths, d.tenths, d.units, d.tens, d.hundreds};
    blank[4] = (d.hundreds == 0);
    blank[3] = blank[4] && (d.tens == 0);
    blank[2] = 0; blank[1] = 0; blank[0] = 0;
    for (int i = 0; i < 5; i++) begin
      ref_bcd = dg[i];
      #1;
      checks++;
      if (blank[i] ? (seg_n[i] !== 7'h7F) : (seg_n[i] !== ref_seg)) begin
        failures++;
        $display("FAIL dist %h digit %0d: seg_n %b", d, i, seg_n[i]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(20'h00000);
    check_one(20'h00505);
    check_one(20'h01000);
    check_one(20'h10000);
    check_one(20'h09999);
    check_one(20'h30000);
    repeat (200) begin
      dist_t d;
      d = {bcd_t'($urandom_range(0, 9)), bcd_t'($urandom_range(0, 9)), bcd_t'($urandom_range(0, 9)),
           bcd_t'($urandom_range(0, 9)), bcd_t'($urandom_range(0, 9))};
      if ($urandom_range(0, 2) == 0) d.hundreds = 0;
      if ($urandom_range(0, 3) == 0) d.tens = 0;
      check_one(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
