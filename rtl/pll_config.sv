// pll_config - PLL configuration register.
//
// Captures the configuration pins (the digital PLL's counter limit) in the
// cycle the power-up sequencer raises sample_en and holds them afterwards, so
// the pins may change freely once the PLL has started. After reset it holds
// RESET_VALUE. The document names this block and its sample enable; the
// register width follows the PLL's 4-bit limit, the reset value is this
// design's choice. Synchronous, active-high reset.
module pll_config #(
  parameter int unsigned    W           = 4,
  parameter logic [W-1:0]   RESET_VALUE = '1
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         sample_en,
  input  logic [W-1:0] cfg_in,
  output logic [W-1:0] cfg
);

  always_ff @(posedge clk) begin
    if (reset)          cfg <= RESET_VALUE;
    else if (sample_en) cfg <= cfg_in;
  end

endmodule
