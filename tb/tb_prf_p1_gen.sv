// Testbench for prf_p1_gen at a shortened PRF period (PRF_DIV = 2000): checks
// the period between P1 pulses, the P1 width of 57 clocks, that pp_seq rises
// with P1 and falls on the clock after a P2 pulse, and that no P2 leaves pp_seq
// high until the next PRF fall.
module tb_prf_p1_gen;
  timeunit 1ns; timeprecision 1ps;

  localparam int DIV = 2000;
  localparam int W   = 57;

  logic   clk = 0, rst_n = 0, p2 = 0, pp_seq, p1;
  longint cyc = 0;
  int     checks = 0, failures = 0;

  prf_p1_gen #(.PRF_DIV(DIV), .PULSE_W(W)) dut (.clk, .rst_n, .p2, .pp_seq, .p1);

  always #62 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint rise_prev = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      longint rise;
      int width, delay;
      do @(posedge clk); while (!p1);
      rise = cyc;
      check(pp_seq, "pp_seq high with P1");
      if (rise_prev >= 0) check(rise - rise_prev == DIV, $sformatf("PRF period %0d", rise - rise_prev));
      rise_prev = rise;
      width = 0;
      while (p1) begin width++; @(posedge clk); end
      check(width == W, $sformatf("P1 width %0d", width));
      if (k % 2 == 0) begin
        // P2 some time later ends the sequence
        delay = $urandom_range(100, 1500);
        repeat (delay) @(posedge clk);
        check(pp_seq, "pp_seq held until P2");
        @(negedge clk); p2 = 1;
        @(posedge clk); #1;
        check(!pp_seq, "pp_seq cleared by P2");
        @(negedge clk); p2 = 0;
      end else begin
        repeat (DIV - W - 5) @(posedge clk);
        check(pp_seq, "pp_seq stays high without P2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
