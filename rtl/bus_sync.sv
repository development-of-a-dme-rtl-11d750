// Multi-bit synchroniser for a slowly changing bus.
//
// Carries the displayed distance from the 140 kHz domain into the 8.09127 MHz
// domain. Every bit passes two flip-flops; a third register holds the previous
// sample, and the output takes a new value only when two successive samples
// agree, so a sample taken while bits were changing is never passed on. The
// source changes at most every 50 fast clocks (once per 140 kHz period, and in
// practice a few times a second), so the output lags the input by three or
// four clk periods. Reset clears everything.
module bus_sync #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] s1_q, s2_q, s3_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
      q    <= '0;
    end else begin
      s1_q <= d;
      s2_q <= s1_q;
      s3_q <= s2_q;
      if (s2_q == s3_q) q <= s3_q;
    end
  end

endmodule
