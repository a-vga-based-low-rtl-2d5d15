// tb_control_adc: runs a frame at each of the six time/div settings and checks the
// number of notWE pulses per frame, their width (1 us = 25 clocks), their
// spacing (the selected sampling period), that sample_no names each
// conversion in order, and the trigger-to-first-pulse latency. Uses
// SAMPLES=20 to keep the run short; rates are the defaults.
`timescale 1ns/1ps
module tb_control_adc;
  localparam int S = 20;
  localparam int unsigned DIVS [6] = '{50, 125, 250, 500, 1250, 2500};
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [5:0] time_div = 6'b000001;
  logic [9:0] sample_no;
  logic not_we, busy;
  int checks = 0, failures = 0;

  control_adc #(.SAMPLES(S)) dut (.clk, .rst_n, .trigger, .time_div, .sample_no, .not_we, .busy);

  always #20 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // pulse monitor
  int n_pulse, last_fall, low_len, bad_width, bad_space, bad_idx, first_fall;
  logic prev_we = 1;
  int sel_div;
  always @(posedge clk) if (rst_n) begin
    if (!not_we && prev_we) begin
      if (n_pulse > 0 && cyc - last_fall != sel_div) begin
        bad_space++;
        $display("spacing %0d", cyc - last_fall);
      end
      if (n_pulse == 0) first_fall = cyc;
      last_fall = cyc;
      low_len = 0;
      n_pulse++;
    end
    if (!not_we) begin
      low_len++;
      // during the pulse sample_no must name this conversion
      if (sample_no != 10'(n_pulse - 1)) bad_idx++;
    end
    if (not_we && !prev_we && low_len != 25) bad_width++;
    prev_we = not_we;
  end

  int trig_cyc;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    foreach (time_div[r]) begin
      time_div = 6'(1 << r);
      sel_div  = DIVS[r];
      n_pulse = 0; bad_width = 0; bad_space = 0; bad_idx = 0;
      @(negedge clk) trigger = 1;
      trig_cyc = cyc;
      repeat (10) @(negedge clk);
      trigger = 0;
      while (busy) @(posedge clk);
      repeat (20) @(posedge clk);
      chk(n_pulse == S, $sformatf("rate %0d: %0d pulses", r, n_pulse));
      chk(bad_width == 0, $sformatf("rate %0d: width errors %0d", r, bad_width));
      chk(bad_space == 0, $sformatf("rate %0d: spacing errors %0d", r, bad_space));
      chk(bad_idx == 0, $sformatf("rate %0d: index errors %0d", r, bad_idx));
      chk(first_fall - trig_cyc == 4, $sformatf("rate %0d: trigger latency %0d", r, first_fall - trig_cyc));
      chk(sample_no == 10'h3FF, "counter reset after the frame");
    end
    // no switch set behaves as the fastest rate
    time_div = 6'b000000; sel_div = DIVS[0];
    n_pulse = 0; bad_space = 0;
    @(negedge clk) trigger = 1;
    @(negedge clk) trigger = 0;
    while (!busy) @(posedge clk);
    while (busy) @(posedge clk);
    chk(n_pulse == S && bad_space == 0, "no switch: fastest rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
