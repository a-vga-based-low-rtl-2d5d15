// memory: the passive sample store, an address_mux in front of a ram.
//
// The sampler owns the mode bit and the mux select: with addr_mux_sel low
// the RAM reads at the displayer's column address; during a sampler write
// addr_mux_sel routes the sampler address and we (write/not-read) stores din
// on the clock edge. Reads are combinational. Structure and sizes are the
// original design's.
module memory
  import osc_pkg::*;
#(
  parameter int unsigned DEPTH = osc_pkg::MEM_DEPTH
) (
  input  logic              clk,
  input  logic              addr_mux_sel,
  input  logic [ADDR_W-1:0] addr_sampler,
  input  logic [ADDR_W-1:0] addr_display,
  input  logic              we,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  logic [ADDR_W-1:0] addr;

  address_mux #(.AW(ADDR_W)) u_address_mux (
    .addr_sampler, .addr_display, .sel(addr_mux_sel), .addr
  );

  ram #(.DEPTH(DEPTH), .DW(DATA_W), .AW(ADDR_W)) u_ram (
    .clk, .we, .addr, .din, .dout
  );
endmodule
