// Non-retriggerable one-shot: a one-cycle trigger starts a pulse that is high
// for exactly WIDTH clk periods, beginning on the clock after the trigger.
// Triggers that arrive while the pulse is high are ignored. Stands in for the
// monostable multivibrators that form the 7 us P1 and P2 pulses; the exact
// clock-count width is a choice of this synchronous version.
module one_shot #(
  parameter int unsigned WIDTH = 57
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic pulse
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [CW-1:0] left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     left_q <= '0;
    else if (left_q != '0)          left_q <= left_q - CW'(1);
    else if (trig)                  left_q <= CW'(WIDTH);
  end

  assign pulse = (left_q != '0);

endmodule
