// Reset synchroniser: asserts rst_out asynchronously with rst_in and
// releases it two rising edges of clk after rst_in falls, so every flop of
// the clk domain leaves reset on the same edge.
module rst_sync (
  input  logic clk,
  input  logic rst_in,    // async, active high
  output logic rst_out    // active high, released synchronously to clk
);
  logic [1:0] sr;
  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) sr <= 2'b11;
    else        sr <= {sr[0], 1'b0};
  end
  assign rst_out = sr[1];
endmodule
