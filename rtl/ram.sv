// ram: DEPTH x DW single-port sample memory with a write/not-read mode bit.
//
// When we is high the word din is written at addr on the rising clock edge.
// The read port is asynchronous: dout always shows the word at addr, like an
// embedded array block with unregistered output. The 1024 x 8 size is the
// original design's; the read-port style is this design's choice. Contents are not
// reset.
module ram #(
  parameter int unsigned DEPTH = osc_pkg::MEM_DEPTH,
  parameter int unsigned DW    = osc_pkg::DATA_W,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  always_comb dout = mem[addr];
endmodule
