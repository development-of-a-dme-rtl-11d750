// Testbench for prog_divider: loads programs from the divider's published
// programming table (the seven rate divisors and the table's end rows, divide
// by 2 and by 4094) and counts the input pulses between output pulses, with the
// input pulses arriving at irregular intervals.
module tb_prog_divider;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 0, rst_n = 0, clk_en = 0, tick;
  logic [11:0] prog;
  int          checks = 0, failures = 0;

  prog_divider dut (.clk, .rst_n, .clk_en, .prog, .tick);

  always #5 clk = ~clk;

  typedef struct { int div; logic [11:0] p; } row_t;
  row_t rows [9] = '{
    '{840, 12'b110100111100}, '{420, 12'b011101110001}, '{280, 12'b100001011110},
    '{210, 12'b000000011111}, '{168, 12'b100011111110}, '{140, 12'b101011000000},
    '{120, 12'b101100011000}, '{2,   12'b111111111110}, '{4094, 12'b001111111111}};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_in();
    @(negedge clk);
    clk_en = 1;
    @(posedge clk);
    #1 clk_en = 0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
  endtask

  initial begin
    prog = rows[0].p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (rows[r]) begin
      int n;
      prog = rows[r].p;
      // run until an output pulse, so the new program is loaded next
      do begin
        @(negedge clk); clk_en = 1; #1;
        if (tick) begin @(posedge clk); #1 clk_en = 0; break; end
        @(posedge clk); #1 clk_en = 0;
      end while (1);
      for (int rep = 0; rep < 2; rep++) begin
        n = 0;
        forever begin
          @(negedge clk);
          clk_en = 1;
          #1;
          n++;
          if (tick) begin @(posedge clk); #1 clk_en = 0; break; end
          @(posedge clk); #1 clk_en = 0;
          repeat ($urandom_range(0, 1)) @(posedge clk);
        end
        checks++;
        if (n != rows[r].div) begin
          failures++;
          $display("FAIL program %b: divides by %0d, expected %0d", rows[r].p, n, rows[r].div);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
