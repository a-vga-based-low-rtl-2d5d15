// mux8in: eight-input, one-bit multiplexer that picks the sampling clock.
//
// Combinational: out = in[sel]. In the controller, inputs 0..5 carry the six
// sampling clocks from clk_generator and inputs 6 and 7 are unused (low).
module mux8in (
  input  logic [7:0] in,
  input  logic [2:0] sel,
  output logic       out
);
  always_comb out = in[sel];
endmodule
