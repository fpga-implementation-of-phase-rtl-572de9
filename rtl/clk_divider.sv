// clk_divider - enable-controlled clock divider for the PLL clock.
//
// Divides clk_i by DIV (an even number, 2 or more) with a 50% duty cycle:
// a counter of DIV/2 input cycles toggles the output. The enable from the
// power-up sequencer comes from another clock domain and is synchronised to
// clk_i with two flops; while it is low the counter is cleared and the output
// held low, so the divided clock starts with a full first half period. The
// document names the divider and its enable; the ratio is this design's.
//
// Timing: clk_o changes on the rising edge of clk_i; the first rising edge of
// clk_o comes 2 + DIV/2 input cycles after en rises. rst_n is asynchronous,
// active low.
module clk_divider #(
  parameter int unsigned DIV = 2
) (
  input  logic clk_i,
  input  logic rst_n,
  input  logic en,
  output logic clk_o
);

  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic          en_s;
  logic [CW-1:0] cnt;

  bit_sync u_en_sync (.clk(clk_i), .d(en), .q(en_s));

  always_ff @(posedge clk_i or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      clk_o <= 1'b0;
    end else if (!en_s) begin
      cnt   <= '0;
      clk_o <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt   <= '0;
      clk_o <= ~clk_o;
    end else begin
      cnt   <= cnt + 1'b1;
    end
  end

endmodule
