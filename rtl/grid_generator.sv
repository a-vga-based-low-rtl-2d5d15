// grid_generator: draws the graticule in green.
//
// green is high when the pixel lies on a vertical line (col a multiple of
// H_DIV, or the last column) or on a horizontal line (row a multiple of
// V_DIV, or the last row). With the defaults this gives 10 x 8 divisions on
// the 640 x 480 screen. Combinational. The original design says only that the grid
// is fixed logic on the pixel location; the spacing is this design's choice.
module grid_generator #(
  parameter int unsigned H_DIV     = 64,
  parameter int unsigned V_DIV     = 60,
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned V_VISIBLE = 480
) (
  input  logic [9:0] col,
  input  logic [9:0] row,
  output logic       green
);
  always_comb begin
    green = (col % 10'(H_DIV) == 10'd0) || (col == 10'(H_VISIBLE - 1)) ||
            (row % 10'(V_DIV) == 10'd0) || (row == 10'(V_VISIBLE - 1));
  end
endmodule
