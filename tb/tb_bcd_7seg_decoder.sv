// Testbench for bcd_7seg_decoder: applies every code with the ripple-blank
// input high and low and compares the lit segments with the reference glyphs
// listed below as segment letters; also checks the ripple-blank output.
module tb_bcd_7seg_decoder;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  bcd_t bcd;
  logic rbi_n, rbo_n;
  seg_t seg_n;
  int   checks = 0, failures = 0;

  bcd_7seg_decoder dut (.bcd, .rbi_n, .seg_n, .rbo_n);

  // lit segments of each digit, TTL glyph set
  string glyph [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                        "acdfg", "cdefg", "abc", "abcdefg", "abcfg"};

  function automatic seg_t expect_seg(int d, bit blank);
    seg_t s = 7'b111_1111;        // all dark
    if (blank || d > 9) return s;
    foreach (glyph[d][k]) s[6 - (glyph[d][k] - "a")] = 1'b0;
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 16; d++) begin
        bit blank;
        bcd   = bcd_t'(d);
        rbi_n = r[0];
        #1;
        blank = (d == 0) && (r == 0);
        checks++;
        if (seg_n !== expect_seg(d, blank)) begin
          failures++;
          $display("FAIL digit %0d rbi_n %0d: seg_n %b expected %b", d, r, seg_n, expect_seg(d, blank));
        end
        checks++;
        if (rbo_n !== !blank) begin
          failures++;
          $display("FAIL digit %0d rbi_n %0d: rbo_n %b", d, r, rbo_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
