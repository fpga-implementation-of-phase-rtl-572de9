// bit_sync - two-flop synchronizer for a single level signal.
//
// d is sampled on clk through STAGES flops; q follows d STAGES clk cycles
// later. Used to bring the reference clock into the system clock domain and
// the divider enable into the PLL clock domain. No reset: the chain fills
// with valid samples within STAGES cycles.
module bit_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] sync;

  always_ff @(posedge clk) sync <= {sync[STAGES-2:0], d};

  assign q = sync[STAGES-1];

endmodule
