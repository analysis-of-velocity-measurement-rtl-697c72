// rst_sync: reset synchroniser. The active-low reset is applied at once and
// released two edges of clk after rst_n_in rises, so each clock domain leaves
// reset cleanly on its own clock.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic stage;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) {rst_n_out, stage} <= 2'b00;
    else           {rst_n_out, stage} <= {stage, 1'b1};
  end

endmodule
