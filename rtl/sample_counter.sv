// sample_counter: the sampleNo counter of controlADC.
//
// Counts rising edges of the sampling clock tick (detected in the system
// clock domain). clear (resetCounter from sampler10b) puts it at all ones, so
// the first sampling edge of a frame makes it 0 and count is always the index
// of the conversion in progress. An edge that arrives while clear is high is
// dropped, not remembered. Edge counting follows the original design; the
// all-ones clear value is this design's choice. count changes one clock after
// the tick edge is seen.
module sample_counter #(
  parameter int unsigned WIDTH = osc_pkg::ADDR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             tick,
  output logic [WIDTH-1:0] count
);
  logic tick_d;

  always_ff @(posedge clk) begin
    if (!rst_n) tick_d <= 1'b0;
    else        tick_d <= tick;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear)       count <= '1;
    else if (tick && !tick_d)  count <= count + 1'b1;
  end
endmodule
