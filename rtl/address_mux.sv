// address_mux: the memory's address multiplexer.
//
// Combinational two-way select of the RAM address bus: sel = 1 routes the
// sampler's address (a write is in progress), sel = 0 routes the displayer's
// current column, which is the normal state. Follows the original design.
module address_mux #(
  parameter int unsigned AW = osc_pkg::ADDR_W
) (
  input  logic [AW-1:0] addr_sampler,
  input  logic [AW-1:0] addr_display,
  input  logic          sel,
  output logic [AW-1:0] addr
);
  always_comb addr = sel ? addr_sampler : addr_display;
endmodule
