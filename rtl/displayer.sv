// displayer: the display half of the controller.
//
// vga_sync scans the screen; its column is the memory read address
// (mem_addr), and the sample read back (data_in, same cycle, asynchronous
// read) is widened, flipped and compared with the current row by
// trace_pixel, which sets blue. grid_generator sets green from the pixel
// location. vga_sync registers the colours and syncs, so every VGA output
// is one clock behind mem_addr. While busy (the sampler's address-mux
// select) the trace is blanked for those pixels. Red is not used. The block
// structure is the original design's.
module displayer #(
  parameter int unsigned SAT_ROW = 479
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data_in,
  input  logic       busy,
  output logic [9:0] mem_addr,
  output logic       red,
  output logic       green,
  output logic       blue,
  output logic       hsync,
  output logic       vsync
);
  logic [9:0] col, row;
  logic       blue_px, green_px;

  trace_pixel #(.SAT_ROW(SAT_ROW)) u_trace_pixel (
    .data(data_in), .row, .busy, .blue(blue_px)
  );

  grid_generator u_grid_generator (.col, .row, .green(green_px));

  vga_sync u_vga_sync (
    .clk, .rst_n, .red_in(1'b0), .green_in(green_px), .blue_in(blue_px),
    .red, .green, .blue, .hsync, .vsync,
    .pixel_col(col), .pixel_row(row), .video_on()
  );

  always_comb mem_addr = col;
endmodule
