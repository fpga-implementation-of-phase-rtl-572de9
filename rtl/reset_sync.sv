// reset_sync - reset synchronizer.
//
// The output reset (active low) is asserted as soon as arst_n goes low,
// without waiting for a clock, and is released only after STAGES rising
// edges of clk have seen arst_n high. This keeps the release of reset
// synchronous to the destination clock so that no flop sees it change near
// its clock edge. The document names a reset synchronization block at the
// chip input and a reset synchronizer inside the core; the two-flop scheme
// with asynchronous assertion is this design's choice.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic [STAGES-1:0] sync;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sync <= '0;
    else         sync <= {sync[STAGES-2:0], 1'b1};
  end

  assign rst_n = sync[STAGES-1];

endmodule
