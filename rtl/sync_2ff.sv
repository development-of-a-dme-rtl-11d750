// Two flip-flop synchroniser for asynchronous switch and pushbutton inputs.
// Each bit of d is sampled twice in the clk domain; q follows d two clocks
// later. Reset clears both stages.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] s1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      q    <= '0;
    end else begin
      s1_q <= d;
      q    <= s1_q;
    end
  end

endmodule
