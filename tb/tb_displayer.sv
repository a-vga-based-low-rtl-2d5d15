// tb_displayer: the display path against a memory model filled with random
// samples. Over two full frames it checks every visible pixel: blue only on
// the row min(510 - 2*d, 479) of the sample d stored for that column, and
// off during the clocks where busy was high; green on the graticule; red
// off; outputs one clock behind the read address. busy is pulsed at random.
`timescale 1ns/1ps
module tb_displayer;
  logic clk = 0, rst_n = 0, busy = 0;
  logic [7:0] data_in;
  logic [9:0] mem_addr;
  logic red, green, blue, hsync, vsync;
  logic [7:0] mem [1024];
  int checks = 0, failures = 0;

  displayer dut (.clk, .rst_n, .data_in, .busy, .mem_addr, .red, .green, .blue, .hsync, .vsync);

  always_comb data_in = mem[mem_addr];

  always #20 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int target(logic [7:0] d);
    int t = 510 - 2 * int'(d);
    return (t > 479) ? 479 : t;
  endfunction

  // expected outputs are computed from the previous clock's location
  int cyc = 0, bad_blue = 0, bad_green = 0, bad_red = 0, n_blue = 0, n_blanked = 0;
  int c_d, r_d;
  logic busy_d;
  int col_t = 0, row_t = 0;   // independent scan position model
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cyc > 1 && c_d < 640 && r_d < 480) begin
      if (blue != (!busy_d && r_d == target(mem[c_d]))) bad_blue++;
      if (busy_d && r_d == target(mem[c_d])) n_blanked++;
      if (green != ((c_d % 64 == 0) || c_d == 639 || (r_d % 60 == 0) || r_d == 479)) bad_green++;
      if (blue) n_blue++;
    end
    if (red) bad_red++;
    if (mem_addr != 10'(col_t)) bad_blue++;
    c_d = col_t; r_d = row_t; busy_d = busy;
    col_t++;
    if (col_t == 800) begin col_t = 0; row_t = (row_t + 1) % 525; end
  end

  // random busy bursts of 2 clocks, like the sampler's writes, often on a
  // trace pixel so blanking is seen
  always @(negedge clk) begin
    if (busy) busy <= ($urandom_range(0, 1) == 1) ? 1'b0 : busy;
    else if (col_t < 640 && row_t < 480 && row_t == target(mem[col_t]) - 0) busy <= 1'($urandom_range(0, 3) == 0);
  end

  initial begin
    foreach (mem[i]) mem[i] = 8'($urandom);
    mem[5] = 8'd0;     // saturates to the bottom row
    mem[6] = 8'd255;   // top row
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2 * 800 * 525) @(posedge clk);
    checks++; if (bad_blue)  begin failures++; $display("FAIL blue errors %0d", bad_blue); end
    checks++; if (bad_green) begin failures++; $display("FAIL green errors %0d", bad_green); end
    checks++; if (bad_red)   begin failures++; $display("FAIL red errors %0d", bad_red); end
    checks++; if (n_blanked == 0) begin failures++; $display("FAIL busy never blanked a trace pixel"); end
    checks++; if (n_blue + n_blanked != 2 * 640) begin failures++; $display("FAIL trace pixels %0d + %0d", n_blue, n_blanked); end
    $display("trace pixels %0d, blanked by busy %0d", n_blue, n_blanked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
