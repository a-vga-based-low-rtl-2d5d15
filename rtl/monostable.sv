// monostable: positive-edge triggered, non-retriggerable one-shot that turns
// each rising edge of the sampling clock into an active-low pulse for the
// ADC's notWE pin.
//
// A rising edge on trig (sampled in the system clock domain) starts a
// down-counter; not_pulse is low for exactly PULSE_CYCLES clocks, starting
// the cycle after the edge is seen. Edges during a pulse are ignored. The
// 1 us pulse width is the original design's; the counter form is this design's.
module monostable #(
  parameter int unsigned PULSE_CYCLES = osc_pkg::PULSE_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic not_pulse
);
  localparam int unsigned CW = $clog2(PULSE_CYCLES + 1);
  logic          trig_d;
  logic [CW-1:0] remain;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trig_d    <= 1'b0;
      remain    <= '0;
      not_pulse <= 1'b1;
    end else begin
      trig_d <= trig;
      if (remain != '0) begin
        remain    <= remain - 1'b1;
        not_pulse <= (remain == CW'(1));
      end else if (trig && !trig_d) begin
        remain    <= CW'(PULSE_CYCLES);
        not_pulse <= 1'b0;
      end
    end
  end
endmodule
