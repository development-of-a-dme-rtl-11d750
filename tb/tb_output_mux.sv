// Testbench for output_mux: random thumbwheel and counter digits with both
// select levels; the output must equal the thumbwheels when sel_a_n is low and
// the counter digits when it is high.
module tb_output_mux;
  import dme_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic   sel_a_n;
  thumb_t a, b, y;
  int     checks = 0, failures = 0;

  output_mux dut (.sel_a_n, .a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      a = thumb_t'($urandom);
      b = thumb_t'($urandom);
      sel_a_n = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel_a_n ? b : a)) begin
        failures++;
        $display("FAIL sel_a_n %b a %h b %h y %h", sel_a_n, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
