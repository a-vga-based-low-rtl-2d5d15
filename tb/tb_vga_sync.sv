// tb_vga_sync: two full 640 x 480 frames at the default timing. Checks the
// line length (800 clocks), the HSYNC pulse (96 clocks, starting 656 clocks
// into the line), the frame length (525 lines), the VSYNC pulse (2 lines,
// starting at line 490), the one-clock output lag, and that colours pass
// only inside the visible area.
`timescale 1ns/1ps
module tb_vga_sync;
  logic clk = 0, rst_n = 0;
  logic red_in, green_in, blue_in;
  logic red, green, blue, hsync, vsync, video_on;
  logic [9:0] pixel_col, pixel_row;
  int checks = 0, failures = 0;

  vga_sync dut (.clk, .rst_n, .red_in, .green_in, .blue_in, .red, .green, .blue,
                .hsync, .vsync, .pixel_col, .pixel_row, .video_on);

  always #20 clk = ~clk;

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // colour inputs are a pattern of the location, so the lag can be checked
  always_comb begin
    red_in   = pixel_col[0];
    green_in = pixel_row[0];
    blue_in  = 1'b1;
  end

  int cyc = 0;
  int exp_col = 0, exp_row = 0;
  int bad_loc = 0, bad_rgb = 0, bad_hs = 0, bad_vs = 0, blue_px = 0;
  logic [9:0] pc_d, pr_d;
  logic von_d;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cyc > 1) begin
      // outputs now reflect the location seen one clock earlier
      if ({red, green, blue} != (von_d ? {pc_d[0], pr_d[0], 1'b1} : 3'b000)) bad_rgb++;
      if (hsync != !(pc_d >= 656 && pc_d < 752)) bad_hs++;
      if (vsync != !(pr_d >= 490 && pr_d < 492)) bad_vs++;
      if (blue) blue_px++;
    end
    if (pixel_col != 10'(exp_col) || pixel_row != 10'(exp_row)) bad_loc++;
    if (video_on != (exp_col < 640 && exp_row < 480)) bad_loc++;
    pc_d = pixel_col; pr_d = pixel_row; von_d = video_on;
    exp_col++;
    if (exp_col == 800) begin
      exp_col = 0;
      exp_row = (exp_row + 1) % 525;
    end
  end

  // measured pulse lengths
  int hs_low = 0, hs_len = 0, vs_low = 0, vs_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (!hsync) hs_low++; else if (hs_low) begin hs_len = hs_low; hs_low = 0; end
    if (!vsync) vs_low++; else if (vs_low) begin vs_len = vs_low; vs_low = 0; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2 * 800 * 525) @(posedge clk);
    chk(bad_loc == 0, $sformatf("pixel location errors %0d", bad_loc));
    chk(bad_rgb == 0, $sformatf("colour gating errors %0d", bad_rgb));
    chk(bad_hs == 0, $sformatf("hsync errors %0d", bad_hs));
    chk(bad_vs == 0, $sformatf("vsync errors %0d", bad_vs));
    chk(hs_len == 96, $sformatf("hsync width %0d", hs_len));
    chk(vs_len == 2 * 800, $sformatf("vsync width %0d", vs_len));
    chk(blue_px == 2 * 640 * 480, $sformatf("visible pixels %0d", blue_px));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
