// Testbench for range_generator on a 140 kHz clock. Presets a distance from
// the thumbwheels, flies inbound and outbound at every rate with X1 and at
// 420 KTS with X2, and checks the number of clocks between 0.01 nm steps
// (140000 * 36 / rate_in_KTS, i.e. 5/3 Hz at 60 KTS), the direction of each
// step, the automatic turn to outbound at zero distance, the stop at 0 KTS and
// the hundredths hold in the digital position.
module tb_range_generator;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic      clk = 0, rst_n = 0;
  rate_pos_e rate_pos = RATE_DIGITAL;
  logic      rate_x2 = 0, pb_inbound = 0, pb_outbound = 0, pb_preset = 0;
  thumb_t    thumb = '0;
  dist_t     count;
  logic      lamp_inbound, lamp_outbound, zero_dst;
  longint    cyc = 0;
  int        checks = 0, failures = 0, n_zero = 0;

  range_generator dut (.clk, .rst_n, .rate_pos, .rate_x2, .pb_inbound, .pb_outbound,
                       .pb_preset, .thumb, .count, .lamp_inbound, .lamp_outbound, .zero_dst);

  always #3571 clk = ~clk;   // 140 kHz
  always @(posedge clk) cyc++;
  always @(posedge clk) if (zero_dst) n_zero++;

  function automatic int to_int(dist_t d);
    return d.hundreds * 10000 + d.tens * 1000 + d.units * 100 + d.tenths * 10 + d.hundredths;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (count %h, cycle %0d)", msg, count, cyc);
    end
  endtask

  task automatic press(ref logic pb);
    @(negedge clk); pb = 1;
    repeat (4) @(negedge clk);
    pb = 0;
    repeat (4) @(negedge clk);
  endtask

  // wait for the next change of the count; returns the old and new value
  task automatic next_step(output longint at, output int from, output int to);
    dist_t prev = count;
    do @(posedge clk); while (count == prev);
    at   = cyc;
    from = to_int(prev);
    to   = to_int(count);
  endtask

  task automatic measure_rate(rate_pos_e pos, bit x2, int steps, int dir);
    longint t0, t1;
    int a, b, expect_cycles;
    int kts = 60 * (int'(pos) - 1) * (x2 ? 2 : 1);
    expect_cycles = 140000 * 36 / kts;
    rate_pos = pos; rate_x2 = x2;
    next_step(t0, a, b);
    for (int s = 0; s < steps; s++) begin
      next_step(t1, a, b);
      check(t1 - t0 == expect_cycles, $sformatf("%0d KTS: %0d clocks per step, expected %0d", kts, t1 - t0, expect_cycles));
      check(b - a == dir, $sformatf("%0d KTS: step %0d -> %0d, expected direction %0d", kts, a, b, dir));
      t0 = t1;
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // static: preset 123.4 nm in digital position
    thumb = 16'h1234;
    press(pb_preset);
    check(count == 20'h12340, "preset 123.4 gives 123.40");
    check(lamp_outbound && !lamp_inbound, "outbound after reset");
    // outbound at every X1 rate
    for (int p = 2; p <= 8; p++) measure_rate(rate_pos_e'(p), 0, 1, +1);
    // inbound at 420 KTS X2
    press(pb_inbound);
    check(lamp_inbound && !lamp_outbound, "inbound lamp");
    measure_rate(RATE_420KT, 1, 3, -1);
    // stop at 0 KTS
    rate_pos = RATE_0KT;
    repeat (10) @(posedge clk);
    begin
      dist_t held;
      held = count;
      repeat (30000) @(posedge clk);
      check(count == held, "0 KTS holds the distance");
    end
    // fly through zero at 840 KTS from 000.1
    rate_pos = RATE_DIGITAL;
    thumb = 16'h0001;
    press(pb_preset);
    check(count == 20'h00010, "preset 000.1");
    rate_pos = RATE_420KT; rate_x2 = 1;
    begin
      longint t; int a, b;
      for (int s = 0; s < 10; s++) next_step(t, a, b);
      check(count == 20'h00000 && lamp_inbound, "reached 000.00 inbound");
      next_step(t, a, b);
      check(count == 20'h00001 && lamp_outbound, "turned outbound after zero, 000.01");
      check(n_zero == 1, "one zero-distance pulse");
    end
    // digital position holds hundredths at zero
    rate_pos = RATE_DIGITAL;
    repeat (10) @(posedge clk);
    check(count.hundredths == 0, "hundredths held at zero in digital position");
    press(pb_outbound);
    check(lamp_outbound, "outbound pushbutton");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
