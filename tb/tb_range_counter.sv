// Testbench for range_counter: random up, down and preset stimulus against an
// integer model of the distance in hundredths of a nautical mile. Checks the
// BCD count each clock, the zero-distance pulse on a count down from 000.00
// (with the count staying at zero), the wrap from 999.99 upward, and the
// hundredths hold.
module tb_range_counter;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic   clk = 0, rst_n = 0;
  logic   cnt_up = 0, cnt_dn = 0, preset = 0, hold_hundredths = 0;
  thumb_t thumb = '0;
  dist_t  count;
  logic   zero_dst;
  int     model = 0;
  int     checks = 0, failures = 0, n_zero = 0, n_wrap = 0;

  range_counter dut (.clk, .rst_n, .cnt_up, .cnt_dn, .preset, .hold_hundredths,
                     .thumb, .count, .zero_dst);

  always #5 clk = ~clk;

  function automatic dist_t to_bcd(int v);
    dist_t d;
    d.hundredths = bcd_t'(v % 10);
    d.tenths     = bcd_t'((v / 10) % 10);
    d.units      = bcd_t'((v / 100) % 10);
    d.tens       = bcd_t'((v / 1000) % 10);
    d.hundreds   = bcd_t'((v / 10000) % 10);
    return d;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit up, bit dn, bit pre, bit hold, int thumb_val);
    bit exp_zero;
    @(negedge clk);
    cnt_up = up; cnt_dn = dn; preset = pre; hold_hundredths = hold;
    thumb  = thumb_t'(to_bcd(thumb_val * 10) >> 4);
    #1;
    exp_zero = dn && !up && !pre && (model == 0);
    checks++;
    if (zero_dst !== exp_zero) begin
      failures++;
      $display("FAIL zero_dst %b expected %b at count %0d", zero_dst, exp_zero, model);
    end
    if (exp_zero) n_zero++;
    @(posedge clk);
    if (pre) model = thumb_val * 10;
    else begin
      if (up && !dn) begin
        if (model == 99999) n_wrap++;
        model = (model + 1) % 100000;
      end else if (dn && !up && model != 0) model = model - 1;
      if (hold) model = model - (model % 10);
    end
    #1;
    checks++;
    if (count !== to_bcd(model)) begin
      failures++;
      $display("FAIL count %h expected %h", count, to_bcd(model));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // preset 000.1, count down through zero
    step(0, 0, 1, 0, 1);
    repeat (14) step(0, 1, 0, 0, 0);
    // preset 999.9 and count up through the wrap
    step(0, 0, 1, 0, 9999);
    repeat (12) step(1, 0, 0, 0, 0);
    // preset 300.0 and count down across decades
    step(0, 0, 1, 0, 3000);
    repeat (30) step(0, 1, 0, 0, 0);
    // hold hundredths
    repeat (5) step(1, 0, 0, 1, 0);
    // random
    repeat (3000) begin
      int r;
      r = $urandom_range(0, 99);
      step(r < 45, r >= 40 && r < 90, r >= 98, 0, $urandom_range(0, 9999));
    end
    checks++;
    if (n_zero == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL zero %0d wrap %0d never seen", n_zero, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
