// clk_generator: the array of sampling clocks, one per time/div setting.
//
// Each output is a square wave made by a divider counter in the 25 MHz
// system clock domain, so no derived clock nets are created; users detect its
// rising edges synchronously. DIVS[i] is the period of output i in system
// clocks. While en (sample_CLK_en) is low, every divider is held at zero and
// every output is low. When en rises, all outputs go high on the next clock,
// so the first sampling edge follows the trigger by one cycle. Outputs are
// registered.
//
// The 500 kHz maximum rate (DIVS[0] = 50) is the original design's; the other five
// rates are this design's choice.
module clk_generator #(
  parameter int unsigned N = osc_pkg::NUM_RATES,
  parameter int unsigned DIVS [N] = osc_pkg::RATE_DIV
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] clk_out
);
  for (genvar i = 0; i < N; i++) begin : g_div
    localparam int unsigned DIV = DIVS[i];
    localparam int unsigned CW  = $clog2(DIV);
    logic [CW-1:0] cnt;

    always_ff @(posedge clk) begin
      if (!rst_n || !en) begin
        cnt        <= '0;
        clk_out[i] <= 1'b0;
      end else begin
        // high for the first half of each period, starting at count 0
        clk_out[i] <= (cnt < CW'(DIV / 2));
        cnt        <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end
endmodule
