// Ground-speed accuracy of the whole simulator at its default parameters.
// For every rate selector position, with X1 and with X2, it flies outbound
// from 100.0 nm and measures, in simulated time, the interval between two
// successive 0.01 nm steps of the displayed distance. The speed this implies,
// 36 / interval_in_seconds knots, must be the selected rate within 0.1 %
// (the crystal is taken as exact, so the result should be exact up to the
// simulator's time resolution).
module tb_rate_accuracy;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic      clk_rate = 0, clk_dme = 0, rst_n = 1;
  thumb_t    thumb = 16'h1000;
  rate_pos_e rate_pos = RATE_DIGITAL;
  logic      rate_x2 = 0, pb_preset = 0;
  seg_t      seg_n [5];
  logic      lamp_inbound, lamp_outbound, zero_dst, p1, p2, pp_out, pp_seq;
  dist_t     distance;
  int        checks = 0, failures = 0;

  dme_simulator dut (.clk_rate, .clk_dme, .rst_n, .thumb, .rate_pos, .rate_x2,
                     .pb_inbound(1'b0), .pb_outbound(1'b0), .pb_preset, .seg_n, .lamp_inbound,
                     .lamp_outbound, .distance, .zero_dst, .p1, .p2, .pp_out, .pp_seq);

  always #3571.429ns clk_rate = ~clk_rate;
  always #61.795ns   clk_dme  = ~clk_dme;

  initial begin
    #10s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_step(output realtime t);
    dist_t prev;
    prev = distance;
    @(distance iff distance != prev);
    t = $realtime;
  endtask

  initial begin
    #5ns rst_n = 0;   // reset edge before the first clock
    #1us rst_n = 1;
    #100us pb_preset = 1;
    #100us pb_preset = 0;
    for (int x = 0; x < 2; x++) begin
      for (int p = 2; p <= 8; p++) begin
        realtime t0, t1;
        real kts, sel;
        rate_pos = rate_pos_e'(p);
        rate_x2  = x[0];
        wait_step(t0);        // first step may be partial after a change
        wait_step(t0);
        wait_step(t1);
        sel = 60.0 * (p - 1) * (x + 1);
        kts = 0.01 * 3600.0 / ((t1 - t0) / 1s);
        $display("selected %4.0f KTS: step every %9.3f ms, %9.3f KTS", sel, (t1 - t0) / 1ms, kts);
        checks++;
        if (kts > sel * 1.001 || kts < sel * 0.999) begin
          failures++;
          $display("FAIL rate error above 0.1 %%");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
