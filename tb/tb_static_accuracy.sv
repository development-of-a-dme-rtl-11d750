// Static-distance accuracy of the whole simulator at its default parameters.
// For thumbwheel settings across the range (000.0 .. 999.9 nm, including the
// 300 nm range requirement) it measures, in simulated time, the interval from
// the rise of P1 to the rise of P2 and converts it back to a distance with the
// output standard, spacing = 50 us + 12.359 us/nm. The error must stay within
// the 0.1 nm goal; the expected value is -0.036 nm (401 instead of 404.56
// clocks of offset).
module tb_static_accuracy;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic      clk_rate = 0, clk_dme = 0, rst_n = 1;
  thumb_t    thumb = '0;
  seg_t      seg_n [5];
  logic      lamp_inbound, lamp_outbound, zero_dst, p1, p2, pp_out, pp_seq;
  dist_t     distance;
  int        checks = 0, failures = 0;

  dme_simulator dut (.clk_rate, .clk_dme, .rst_n, .thumb, .rate_pos(RATE_DIGITAL), .rate_x2(1'b0),
                     .pb_inbound(1'b0), .pb_outbound(1'b0), .pb_preset(1'b0), .seg_n, .lamp_inbound,
                     .lamp_outbound, .distance, .zero_dst, .p1, .p2, .pp_out, .pp_seq);

  always #3571.429ns clk_rate = ~clk_rate;
  always #61.795ns   clk_dme  = ~clk_dme;

  initial begin
    #3s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int settings [7] = '{0, 1, 123, 1000, 2500, 3000, 9999};   // tenths of nm
    #5ns rst_n = 0;   // reset edge before the first clock
    #1us rst_n = 1;
    foreach (settings[i]) begin
      realtime t1, t2;
      real nm, err;
      thumb = thumb_t'({4'(settings[i] / 1000), 4'((settings[i] / 100) % 10),
                        4'((settings[i] / 10) % 10), 4'(settings[i] % 10)});
      // let one pulse pair go by so the new distance has settled
      @(posedge p2);
      @(posedge p1); t1 = $realtime;
      @(posedge p2); t2 = $realtime;
      nm  = ((t2 - t1) / 1us - 50.0) / 12.359;
      err = nm - settings[i] / 10.0;
      $display("set %6.1f nm: spacing %9.3f us, reads %8.3f nm, error %6.3f nm",
               settings[i] / 10.0, (t2 - t1) / 1us, nm, err);
      checks++;
      if (err > 0.1 || err < -0.1) begin
        failures++;
        $display("FAIL error %f nm exceeds 0.1 nm", err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
