// Two-flop synchroniser for one asynchronous level signal.
//
// Every input that comes from outside the master-clock domain (the comparator
// outputs of the RGB input interface and the vertical sync returned by the
// MC1378) passes through one of these before any logic uses it. The output
// follows the input two clock edges later; reset clears both stages.
module sync_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
