// Testbench for delay_50us: raises pp_seq and counts the clocks until
// dlyd_clk_ena rises (400 expected), checks that it stays high while pp_seq
// is high and clears within a clock of pp_seq falling; also drops pp_seq
// early, before the count completes, which must restart the count.
module tb_delay_50us;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, pp_seq = 0, dlyd_clk_ena;
  int   checks = 0, failures = 0;

  delay_50us dut (.clk, .rst_n, .pp_seq, .dlyd_clk_ena);

  always #62 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      int n;
      if (k == 2) begin
        // aborted sequence
        @(negedge clk); pp_seq = 1;
        repeat (250) @(negedge clk);
        pp_seq = 0;
        repeat (5) @(negedge clk);
      end
      @(negedge clk);
      pp_seq = 1;
      n = 0;
      do begin @(posedge clk); n++; #1; end while (!dlyd_clk_ena && n < 1000);
      check(n == 400, $sformatf("enable after %0d clocks, expected 400", n));
      repeat ($urandom_range(1, 300)) begin
        @(posedge clk); #1;
        if (!dlyd_clk_ena) begin check(0, "enable dropped"); break; end
      end
      @(negedge clk); pp_seq = 0;
      @(posedge clk); #1;
      check(!dlyd_clk_ena, "enable cleared after pp_seq falls");
      repeat (10) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
