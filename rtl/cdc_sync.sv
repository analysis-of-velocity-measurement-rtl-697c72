// cdc_sync: two-flip-flop synchroniser for a single level signal.
//
// d comes from another clock domain; q follows it two clk edges later.
// Used on toggle signals, so every change of d is seen exactly once.
module cdc_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
  end

endmodule
