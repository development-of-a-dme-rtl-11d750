// Testbench for pulse_pair_converter with a shortened PRF period
// (PRF_DIV = 20000 clocks). For a series of distances D (in 0.01 nm) it
// checks the P1-to-P2 spacing of 401 + D clocks, the 57-clock width of both
// pulses, the PRF period, that pp_out is P1 OR P2 and that pp_seq spans the
// pair. The distance is changed between pulse pairs.
module tb_pulse_pair_converter;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int DIV = 20000;

  logic   clk = 0, rst_n = 0, p1, p2, pp_out, pp_seq;
  dist_t  dist_in = '0;
  longint cyc = 0;
  int     checks = 0, failures = 0;

  pulse_pair_converter #(.PRF_DIV(DIV)) dut (.clk, .rst_n, .dist_in, .p1, .p2, .pp_out, .pp_seq);

  always #62 clk = ~clk;
  always @(negedge clk) cyc++;

  // pp_out must always be P1 OR P2
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (pp_out !== (p1 | p2)) begin failures++; $display("FAIL pp_out %b p1 %b p2 %b", pp_out, p1, p2); end
  end

  function automatic dist_t to_bcd(int v);
    return {bcd_t'((v / 10000) % 10), bcd_t'((v / 1000) % 10), bcd_t'((v / 100) % 10),
            bcd_t'((v / 10) % 10), bcd_t'(v % 10)};
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (DIV * 14) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint prev_p1 = -1;
    int ds [6] = '{0, 1, 12359, 3000, 18000, 505};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      int d, n, w1, w2;
      d = (k < 6) ? ds[k] : $urandom_range(0, 19000);
      @(negedge clk);
      dist_in = to_bcd(d);
      do @(negedge clk); while (!p1);
      check(pp_seq, "pp_seq high at P1");
      if (prev_p1 >= 0) check(cyc - prev_p1 == DIV, $sformatf("PRF period %0d", cyc - prev_p1));
      prev_p1 = cyc;
      n = 0; w1 = 0;
      while (!p2 && n < 25000) begin
        if (p1) w1++;
        @(negedge clk); n++;
      end
      check(w1 == 57, $sformatf("P1 width %0d", w1));
      check(n == 401 + d, $sformatf("D=%0d: spacing %0d clocks, expected %0d", d, n, 401 + d));
      w2 = 0;
      while (p2) begin w2++; @(negedge clk); end
      check(w2 == 57, $sformatf("P2 width %0d", w2));
      check(!pp_seq, "pp_seq ends with P2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
