// Testbench for rate_control: measures the number of enabled 140 kHz clocks
// between output pulses, which must be 100 with X1 and 50 with X2, with the
// enable held high and with it dropped at random; with the enable low there
// must be no pulses at all.
module tb_rate_control;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, enable = 0, x2 = 0, tick;
  int   checks = 0, failures = 0;

  rate_control dut (.clk, .rst_n, .enable, .x2, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count enabled clocks between ticks
  task automatic measure(bit mult2, bit random_gate, int periods);
    int n;
    x2 = mult2;
    // align to a tick
    enable = 1;
    do @(posedge clk); while (!tick);
    for (int p = 0; p < periods; p++) begin
      n = 0;
      forever begin
        @(negedge clk);
        enable = random_gate ? 1'($urandom_range(0, 3) != 0) : 1'b1;
        @(posedge clk);
        if (enable) n++;
        if (tick) break;
      end
      checks++;
      if (n != (mult2 ? 50 : 100)) begin
        failures++;
        $display("FAIL x2=%0d: %0d enabled clocks per pulse", mult2, n);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(0, 0, 5);
    measure(1, 0, 5);
    measure(0, 1, 5);
    measure(1, 1, 5);
    // gate closed: no pulses
    @(negedge clk);
    enable = 0;
    begin
      int seen = 0;
      repeat (500) begin
        @(posedge clk);
        if (tick) seen++;
      end
      checks++;
      if (seen != 0) begin
        failures++;
        $display("FAIL %0d pulses with the gate closed", seen);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
