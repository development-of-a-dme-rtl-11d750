// Reset synchroniser: asserts rst_n_out asynchronously with rst_n_in and
// releases it two clk edges after rst_n_in rises, so every register of a
// clock domain leaves reset on the same edge.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic s1_q;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      s1_q      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      s1_q      <= 1'b1;
      rst_n_out <= s1_q;
    end
  end

endmodule
