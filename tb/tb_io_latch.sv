// Testbench for io_latch: random pushbutton, zero-distance and rate-pulse
// stimulus against a reference state variable; checks the count steering and
// both lamps every clock.
module tb_io_latch;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  logic pb_inbound = 0, pb_outbound = 0, zero_dst = 0, rate_tick = 0;
  logic cnt_up, cnt_dn, lamp_inbound, lamp_outbound;
  bit   inb = 0;
  int   checks = 0, failures = 0, n_in = 0, n_zero = 0;

  io_latch dut (.clk, .rst_n, .pb_inbound, .pb_outbound, .zero_dst, .rate_tick,
                .cnt_up, .cnt_dn, .lamp_inbound, .lamp_outbound);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      pb_inbound  = ($urandom_range(0, 9) == 0);
      pb_outbound = ($urandom_range(0, 19) == 0);
      zero_dst    = ($urandom_range(0, 14) == 0);
      rate_tick   = ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (cnt_up !== (rate_tick && !inb) || cnt_dn !== (rate_tick && inb) ||
          lamp_inbound !== inb || lamp_outbound !== !inb) begin
        failures++;
        $display("FAIL at %0t: inbound %0b up %b dn %b lamps %b%b", $time, inb, cnt_up, cnt_dn, lamp_inbound, lamp_outbound);
      end
      @(posedge clk);
      if (pb_outbound || zero_dst) begin
        if (inb && zero_dst) n_zero++;
        inb = 0;
      end else if (pb_inbound) begin
        if (!inb) n_in++;
        inb = 1;
      end
    end
    checks++;
    if (n_in == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL stimulus never switched inbound (%0d) or flew over zero (%0d)", n_in, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
