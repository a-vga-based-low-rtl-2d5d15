// vga_sync: 640 x 480, 60 Hz VGA timing generator and output stage.
//
// A horizontal counter runs 0..H_TOTAL-1 at the 25 MHz pixel clock and a
// vertical counter advances at the end of each line, 0..V_TOTAL-1.
// pixel_col / pixel_row are the counters themselves and video_on is high in
// the 640 x 480 visible area. The colour inputs are sampled against the
// current pixel location and registered, forced to 0 outside the visible
// area; hsync and vsync (active low) are registered in the same stage, so
// every VGA output lags pixel_col / pixel_row by exactly one clock.
//
// The original design took this block from a textbook and gives only its job; the
// porch and sync lengths are the standard industry 640 x 480 @ 60 Hz values
// (800 x 525 clocks per frame), not numbers from the original design.
module vga_sync #(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       red_in,
  input  logic       green_in,
  input  logic       blue_in,
  output logic       red,
  output logic       green,
  output logic       blue,
  output logic       hsync,
  output logic       vsync,
  output logic [9:0] pixel_col,
  output logic [9:0] pixel_row,
  output logic       video_on
);
  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  logic [9:0] h_cnt, v_cnt;
  logic       h_sync_on, v_sync_on;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (h_cnt == 10'(H_TOTAL - 1)) begin
      h_cnt <= '0;
      v_cnt <= (v_cnt == 10'(V_TOTAL - 1)) ? '0 : v_cnt + 1'b1;
    end else begin
      h_cnt <= h_cnt + 1'b1;
    end
  end

  always_comb begin
    pixel_col = h_cnt;
    pixel_row = v_cnt;
    video_on  = (h_cnt < 10'(H_VISIBLE)) && (v_cnt < 10'(V_VISIBLE));
    h_sync_on = (h_cnt >= 10'(H_VISIBLE + H_FRONT)) && (h_cnt < 10'(H_VISIBLE + H_FRONT + H_SYNC));
    v_sync_on = (v_cnt >= 10'(V_VISIBLE + V_FRONT)) && (v_cnt < 10'(V_VISIBLE + V_FRONT + V_SYNC));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {red, green, blue} <= '0;
      hsync <= 1'b1;
      vsync <= 1'b1;
    end else begin
      red   <= red_in   && video_on;
      green <= green_in && video_on;
      blue  <= blue_in  && video_on;
      hsync <= !h_sync_on;
      vsync <= !v_sync_on;
    end
  end
endmodule
