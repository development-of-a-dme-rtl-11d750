// End-to-end testbench of the DME simulator at its default parameters, with
// both clocks at their real frequencies (140 kHz and 8.09127 MHz), so one
// pulse pair every 40 ms.
//
// It runs one static and one dynamic operation: a thumbwheel distance of
// 012.3 nm in digital mode (checks the display, including the blanked leading
// zero, and the pulse spacing of 401 + 1230 distance clocks); then a preset to
// 000.1 nm, inbound flight at 840 KTS (420 KTS with X2) through zero, the
// automatic turn outbound, 420 KTS with X1, and a stop at 0 KTS. Every pulse
// pair is checked against the displayed distance (spacing 401 + D clocks for
// D in 0.01 nm). Each mechanism is counted and must occur at least once.
module tb_dme_simulator;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic      clk_rate = 0, clk_dme = 0, rst_n = 1;
  thumb_t    thumb = '0;
  rate_pos_e rate_pos = RATE_DIGITAL;
  logic      rate_x2 = 0, pb_inbound = 0, pb_outbound = 0, pb_preset = 0;
  seg_t      seg_n [5];
  logic      lamp_inbound, lamp_outbound, zero_dst, p1, p2, pp_out, pp_seq;
  dist_t     distance;

  dme_simulator dut (.clk_rate, .clk_dme, .rst_n, .thumb, .rate_pos, .rate_x2,
                     .pb_inbound, .pb_outbound, .pb_preset, .seg_n, .lamp_inbound,
                     .lamp_outbound, .distance, .zero_dst, .p1, .p2, .pp_out, .pp_seq);

  always #3571.429ns clk_rate = ~clk_rate;   // 140 kHz
  always #61.795ns   clk_dme  = ~clk_dme;    // 8.09127 MHz

  int checks = 0, failures = 0;
  int n_pairs = 0, n_static = 0, n_preset = 0, n_blank = 0, n_in_steps = 0, n_out_steps = 0;
  int n_flyover = 0, n_x2 = 0, n_x1 = 0, n_stop = 0;
  longint rate_cyc = 0;

  always @(posedge clk_rate) rate_cyc++;

  function automatic int to_int(dist_t d);
    return d.hundreds * 10000 + d.tens * 1000 + d.units * 100 + d.tenths * 10 + d.hundredths;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ---- pulse pair monitor: spacing against the displayed distance ----
  initial begin
    int d_now, d_old, n;
    forever begin
      @(negedge clk_dme);
      if (p1 && rst_n) begin
        d_now = to_int(distance);
        n = 0;
        while (!p2 && n < 130000) begin @(negedge clk_dme); n++; end
        checks++;
        // the distance may have stepped just before P1 (synchroniser lag)
        if (n != 401 + d_now && n != 401 + d_old) begin
          failures++;
          $display("FAIL pulse spacing %0d clocks, distance %0d", n, d_now);
        end
        n_pairs++;
        while (p2) @(negedge clk_dme);
      end
      d_old = to_int(distance);
    end
  end

  always @(posedge clk_rate) if (zero_dst) n_flyover++;

  task automatic press(ref logic pb);
    repeat (2) @(negedge clk_rate);
    pb = 1;
    repeat (5) @(negedge clk_rate);
    pb = 0;
    repeat (5) @(negedge clk_rate);
  endtask

  task automatic wait_pairs(int k);
    int target = n_pairs + k;
    while (n_pairs < target) @(negedge clk_dme);
  endtask

  // wait for the next distance step, return its length in rate clocks
  task automatic next_step(output longint len, output int delta);
    static longint last = 0;
    dist_t prev;
    prev = distance;
    do @(posedge clk_rate); while (distance == prev);
    len   = rate_cyc - last;
    last  = rate_cyc;
    delta = to_int(distance) - to_int(prev);
  endtask

  initial begin
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint len;
    int delta;
    #5ns rst_n = 0;   // reset edge before the first clock
    #1us rst_n = 1;

    // ---- static operation: 012.3 nm from the thumbwheels ----
    thumb = 16'h0123;
    wait_pairs(2);
    check(distance == 20'h01230, "static distance 012.30");
    check(seg_n[4] == 7'h7F, "leading zero blanked");
    check(seg_n[3] == 7'b100_1111 && seg_n[2] == 7'b001_0010 && seg_n[1] == 7'b000_0110 &&
          seg_n[0] == 7'b000_0001, "display shows 12.30");
    if (seg_n[4] == 7'h7F) n_blank++;
    n_static++;

    // ---- dynamic operation: preset 000.1, inbound at 840 KTS ----
    thumb = 16'h0001;
    press(pb_preset);
    rate_pos = RATE_420KT;
    repeat (5) @(posedge clk_rate);
    check(distance == 20'h00010, "preset loaded 000.10");
    n_preset++;
    press(pb_inbound);
    check(lamp_inbound && !lamp_outbound, "inbound lamp");
    rate_x2 = 1;
    next_step(len, delta);                       // align
    for (int s = 0; s < 9; s++) begin
      next_step(len, delta);
      check(len == 6000 && delta == -1, $sformatf("inbound X2 step: %0d clocks, %0d", len, delta));
      n_in_steps++; n_x2++;
    end
    check(distance == 20'h00000, "reached 000.00");
    next_step(len, delta);
    // the rate pulse at 000.00 only turns the latch, so this step takes two
    check(len == 12000 && delta == 1 && lamp_outbound,
          $sformatf("fly-over: turned outbound, %0d clocks, %0d", len, delta));
    check(n_flyover == 1, "one zero-distance pulse");
    next_step(len, delta);
    check(len == 6000 && delta == 1, "outbound X2 step");
    n_out_steps++;

    // ---- 420 KTS with X1 ----
    rate_x2 = 0;
    next_step(len, delta);
    next_step(len, delta);
    check(len == 12000 && delta == 1, $sformatf("outbound X1 step: %0d clocks", len));
    n_x1++; n_out_steps++;

    // ---- stop at 0 KTS ----
    rate_pos = RATE_0KT;
    begin
      dist_t held;
      repeat (5) @(posedge clk_rate);
      held = distance;
      wait_pairs(2);
      check(distance == held, "0 KTS holds the distance");
      n_stop++;
    end

    check(n_pairs >= 10, $sformatf("%0d pulse pairs seen", n_pairs));
    $display("mechanisms: static %0d preset %0d blank %0d inbound %0d outbound %0d fly-over %0d X2 %0d X1 %0d stop %0d pairs %0d",
             n_static, n_preset, n_blank, n_in_steps, n_out_steps, n_flyover, n_x2, n_x1, n_stop, n_pairs);
    check(n_static > 0 && n_preset > 0 && n_blank > 0 && n_in_steps > 0 && n_out_steps > 0 &&
          n_flyover > 0 && n_x2 > 0 && n_x1 > 0 && n_stop > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
