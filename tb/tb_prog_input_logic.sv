// Testbench for prog_input_logic: for every rate position, runs the program
// through an independent model of the 12-stage shift-register divider (stage
// numbers P1..P12 as in the data sheet, feedback P5^P8^P9^P12 into P1) and
// checks that it divides by 50400 / (rate in KTS). The digital and 0 KTS
// positions must give all ones.
module tb_prog_input_logic;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  rate_pos_e   rate_pos;
  logic [11:0] prog;
  int          checks = 0, failures = 0;

  prog_input_logic dut (.rate_pos, .prog);

  // number of states from the program to all ones, inclusive
  function automatic int period_of(logic [11:0] p);
    bit st [1:12];
    int n = 1;
    for (int k = 1; k <= 12; k++) st[k] = p[12 - k];
    while (1) begin
      bit all1 = 1, fb;
      for (int k = 1; k <= 12; k++) all1 &= st[k];
      if (all1 || n > 5000) break;
      fb = st[5] ^ st[8] ^ st[9] ^ st[12];
      for (int k = 12; k >= 2; k--) st[k] = st[k - 1];
      st[1] = fb;
      n++;
    end
    return n;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pos = 2; pos <= 8; pos++) begin
      int kts;
      kts = 60 * (pos - 1);
      rate_pos = rate_pos_e'(pos);
      #1;
      checks++;
      if (period_of(prog) != 50400 / kts) begin
        failures++;
        $display("FAIL %0d KTS: program %b divides by %0d, expected %0d", kts, prog, period_of(prog), 50400 / kts);
      end
    end
    rate_pos = RATE_DIGITAL; #1;
    checks++;
    if (prog !== 12'hFFF) begin failures++; $display("FAIL digital position program %b", prog); end
    rate_pos = RATE_0KT; #1;
    checks++;
    if (prog !== 12'hFFF) begin failures++; $display("FAIL 0 KTS position program %b", prog); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
