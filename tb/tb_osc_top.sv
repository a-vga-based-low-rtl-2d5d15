// tb_osc_top: end-to-end run of the whole controller at its default
// parameters (640 samples, 1024 x 8 memory, 640 x 480 VGA, 25 MHz), with
// the ADC model fed by a triangle wave like a 555 demo generator.
//
// Sequence: frame 1 at the fastest rate (500 kHz), a full VGA frame is
// checked pixel by pixel; frame 2 at the 200 kHz setting and frame 3 at the
// slowest, 10 kHz, setting, each checked the same way.
// A second trigger edge is given in the middle of frame 1 and must be
// ignored. Checks per frame: 640 conversions and 640 writes, notWE spacing
// equal to the selected sampling period and width 1 us, exactly one blue
// pixel per column at row min(510 - 2*d, 479) of that column's converted
// sample d, the graticule in green, red off. Mechanisms counted and
// required at least once: frames taken, trigger ignored during a frame,
// trace blanked by a write during the visible scan, saturated samples,
// time/div rate switch.
`timescale 1ns/1ps
module tb_osc_top;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [5:0] time_div = 6'b000001;
  logic [7:0] adc_data, vin;
  logic adc_not_int, adc_not_we;
  logic vga_red, vga_green, vga_blue, vga_hsync, vga_vsync, sampling;
  int checks = 0, failures = 0;

  osc_top dut (.clk, .rst_n, .trigger, .time_div, .adc_data, .adc_not_int, .adc_not_we,
               .vga_red, .vga_green, .vga_blue, .vga_hsync, .vga_vsync, .sampling);

  adc0820_model adc (.not_we(adc_not_we), .vin, .data(adc_data), .not_int(adc_not_int));

  always #20 clk = ~clk;   // 25 MHz

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // triangle wave 0..255..0, period 409.6 us, updated every 100 ns
  int tri_step = 0;
  always #100 begin
    tri_step = (tri_step + 1) % 4096;
    vin = (tri_step < 2048) ? 8'(tri_step / 8) : 8'((4095 - tri_step) / 8);
  end

  function automatic int target(logic [7:0] d);
    int t = 510 - 2 * int'(d);
    return (t > 479) ? 479 : t;
  endfunction

  // ---- notWE monitor: spacing and width
  int cyc = 0, we_fall = 0, we_low = 0, n_we = 0, bad_space = 0, bad_width = 0, exp_space = 50;
  logic we_d = 1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!adc_not_we && we_d) begin
      if (n_we > 0 && cyc - we_fall != exp_space) bad_space++;
      we_fall = cyc; n_we++; we_low = 0;
    end
    if (!adc_not_we) we_low++;
    if (adc_not_we && !we_d && we_low != 25) bad_width++;
    we_d = adc_not_we;
  end

  // ---- write monitor and blanking counter (observes the memory port)
  int n_wr = 0, blanked = 0;
  int tc = 0, tr = 0;          // scan position rebuilt from VSYNC
  logic vs_d = 1, synced = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.mem_we) n_wr++;
    // position of the pixel whose colour is on the outputs now
    if (!vga_vsync && vs_d) begin tc = 0; tr = 490; synced = 1; end
    else begin
      tc++;
      if (tc == 800) begin tc = 0; tr = (tr + 1) % 525; end
    end
    vs_d = vga_vsync;
    // a write's address-mux cycle during the visible scan blanks the trace
    if (synced && dut.addr_mux_sel && tc < 639 && tr < 480) blanked++;
  end

  // ---- frame checker: runs in the monitor's clock, on the pre-edge
  // output values, for one complete visible frame once armed
  int col_blue [640];
  int bad_pos, bad_green, bad_red, n_green, n_sat, chk_base;
  logic arm = 0, active = 0, done = 0;
  always @(posedge clk) if (rst_n && synced) begin
    if (arm && tc == 0 && tr == 0) begin
      active = 1; arm = 0;
      foreach (col_blue[c]) col_blue[c] = 0;
      bad_pos = 0; bad_green = 0; bad_red = 0; n_green = 0;
    end
    if (active) begin
      if (tr < 480 && tc < 640) begin
        if (vga_blue) begin
          col_blue[tc]++;
          if (tr != target(adc.conv_log[chk_base + tc])) bad_pos++;
        end
        if (vga_green) n_green++;
        if (vga_green != ((tc % 64 == 0) || tc == 639 || (tr % 60 == 0) || tr == 479)) bad_green++;
      end else if (vga_blue || vga_green) bad_green++;
      if (vga_red) bad_red++;
      if (tr == 479 && tc == 799) begin active = 0; done = 1; end
    end
  end

  task automatic check_screen(int base, string tag);
    chk_base = base;
    done = 0;
    arm = 1;
    while (!done) @(posedge clk);
    n_sat = 0;
    foreach (col_blue[c]) begin
      if (col_blue[c] != 1) bad_pos++;
      if (510 - 2 * int'(adc.conv_log[base + c]) > 479) n_sat++;
    end
    chk(bad_pos == 0, $sformatf("%s: trace position errors %0d", tag, bad_pos));
    chk(bad_green == 0 && n_green == 11 * 480 + 9 * 640 - 99, $sformatf("%s: grid errors %0d (%0d green)", tag, bad_green, n_green));
    chk(bad_red == 0, $sformatf("%s: red errors %0d", tag, bad_red));
    sat_total += n_sat;
  endtask

  int sat_total = 0, frames = 0, ignored = 0, rate_switches = 0;
  int base, t_start, t_end;
  initial begin
    vin = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (1000) @(posedge clk);

    // ---- frame 1: 500 kHz
    base = adc.n_conv; n_we = 0; n_wr = 0; bad_space = 0; bad_width = 0; exp_space = 50;
    @(negedge clk) trigger = 1;
    t_start = cyc;
    repeat (2000) @(negedge clk);
    trigger = 0;
    repeat (10000) @(negedge clk);
    trigger = 1;                     // second edge inside the frame
    repeat (2000) @(negedge clk);
    trigger = 0;
    while (sampling) @(posedge clk);
    t_end = cyc;
    frames++;
    chk(adc.n_conv - base == 640, $sformatf("frame 1: %0d conversions", adc.n_conv - base));
    chk(n_wr == 640, $sformatf("frame 1: %0d writes", n_wr));
    chk(bad_space == 0 && bad_width == 0, $sformatf("frame 1: notWE spacing %0d width %0d errors", bad_space, bad_width));
    // 640 samples at 500 kHz: 639 sampling periods from the first to the
    // last sampling edge, then the 100-clock flush and a few clocks of latency
    chk(t_end - t_start >= 639 * 50 + 100 && t_end - t_start <= 639 * 50 + 110, $sformatf("frame 1 length %0d clocks", t_end - t_start));
    if (adc.n_conv - base == 640) ignored++;
    check_screen(base, "frame 1");

    // ---- frame 2: 200 kHz
    time_div = 6'b000010; rate_switches++;
    base = adc.n_conv; n_we = 0; n_wr = 0; bad_space = 0; bad_width = 0; exp_space = 125;
    repeat (3) @(negedge clk);
    trigger = 1;
    t_start = cyc;
    repeat (5000) @(negedge clk);
    trigger = 0;
    while (sampling) @(posedge clk);
    t_end = cyc;
    frames++;
    chk(adc.n_conv - base == 640, $sformatf("frame 2: %0d conversions", adc.n_conv - base));
    chk(n_wr == 640, $sformatf("frame 2: %0d writes", n_wr));
    chk(bad_space == 0 && bad_width == 0, $sformatf("frame 2: notWE spacing %0d width %0d errors", bad_space, bad_width));
    chk(t_end - t_start >= 639 * 125 + 100 && t_end - t_start <= 639 * 125 + 110, $sformatf("frame 2 length %0d clocks", t_end - t_start));
    check_screen(base, "frame 2");

    // ---- frame 3: 10 kHz, the slowest setting
    time_div = 6'b100000; rate_switches++;
    base = adc.n_conv; n_we = 0; n_wr = 0; bad_space = 0; bad_width = 0; exp_space = 2500;
    repeat (3) @(negedge clk);
    trigger = 1;
    t_start = cyc;
    repeat (5000) @(negedge clk);
    trigger = 0;
    while (sampling) @(posedge clk);
    t_end = cyc;
    frames++;
    chk(adc.n_conv - base == 640, $sformatf("frame 3: %0d conversions", adc.n_conv - base));
    chk(n_wr == 640, $sformatf("frame 3: %0d writes", n_wr));
    chk(bad_space == 0 && bad_width == 0, $sformatf("frame 3: notWE spacing %0d width %0d errors", bad_space, bad_width));
    chk(t_end - t_start >= 639 * 2500 + 100 && t_end - t_start <= 639 * 2500 + 110, $sformatf("frame 3 length %0d clocks", t_end - t_start));
    check_screen(base, "frame 3");

    $display("mechanisms: frames=%0d ignored_triggers=%0d blanked_write_cycles=%0d saturated_samples=%0d rate_switches=%0d",
             frames, ignored, blanked, sat_total, rate_switches);
    chk(frames == 3, "frames taken");
    chk(ignored > 0, "trigger during a frame ignored");
    chk(blanked > 0, "trace blanked by a write during the visible scan");
    chk(sat_total > 0, "saturated samples clamped to the bottom row");
    chk(rate_switches > 0, "time/div rate switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
