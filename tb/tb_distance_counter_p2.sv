// Testbench for distance_counter_p2: drives a pulse pair sequence the way the
// PRF and delay stages do (pp_seq and a 57-clock P1 together, the count
// enable 400 clocks later) for random distances D and checks that P2 rises
// exactly 401 + D clocks after P1 and is 57 clocks wide.
module tb_distance_counter_p2;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic   clk = 0, rst_n = 0, pp_seq = 0, p1 = 0, ena = 0, p2_trig, p2;
  dist_t  dist_in = '0;
  longint cyc = 0;
  int     checks = 0, failures = 0;

  distance_counter_p2 dut (.clk, .rst_n, .pp_seq, .p1, .dlyd_clk_ena(ena), .dist_in, .p2_trig, .p2);

  always #62 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic dist_t to_bcd(int v);
    return {bcd_t'((v / 10000) % 10), bcd_t'((v / 1000) % 10), bcd_t'((v / 100) % 10),
            bcd_t'((v / 10) % 10), bcd_t'(v % 10)};
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ds [8] = '{0, 1, 9, 10, 12345, 3000, 99999, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      int d, w, n;
      d = (k < 8) ? ds[k] : $urandom_range(0, 40000);
      dist_in = to_bcd(d);
      @(negedge clk);
      pp_seq = 1; p1 = 1;
      fork
        begin repeat (57) @(negedge clk); p1 = 0; end
        begin repeat (400) @(negedge clk); ena = 1; end
      join_none
      // count clock periods, sampled mid-period, from P1 high to P2 high
      n = 0;
      do begin @(negedge clk); n++; end while (!p2 && n < d + 1000);
      check(n == 401 + d, $sformatf("D=%0d: P2 %0d clocks after P1, expected %0d", d, n, 401 + d));
      pp_seq = 0; ena = 0;   // P2 resets the sequence
      w = 0;
      while (p2) begin w++; @(negedge clk); end
      check(w == 57, $sformatf("P2 width %0d", w));
      repeat (20) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
