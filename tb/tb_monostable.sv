// tb_monostable: checks the 1 us (25-clock) active-low pulse on each rising
// trigger edge, that edges inside a pulse are ignored (non-retriggerable),
// and that a long-high trigger gives one pulse only.
`timescale 1ns/1ps
module tb_monostable;
  logic clk = 0, rst_n = 0, trig = 0, not_pulse;
  int checks = 0, failures = 0;
  int low_len = 0, pulses = 0, last_len = 0;

  monostable dut (.clk, .rst_n, .trig, .not_pulse);

  always #20 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic prev_np = 1;
  always @(posedge clk) begin
    if (!rst_n) begin prev_np = 1; low_len = 0; end
    else if (!not_pulse) low_len++;
    if (rst_n && not_pulse && !prev_np) begin pulses++; last_len = low_len; low_len = 0; end
    prev_np = not_pulse;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    #1 chk(not_pulse == 1, "idle high");
    // single short trigger
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    @(posedge clk); #1 chk(not_pulse == 0, "pulse starts the clock after the edge");
    repeat (40) @(posedge clk);
    chk(pulses == 1 && last_len == 25, $sformatf("one 25-clock pulse (n=%0d len=%0d)", pulses, last_len));
    // retrigger attempt inside the pulse
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    repeat (5) @(negedge clk);
    trig = 1;
    @(negedge clk) trig = 0;
    repeat (60) @(posedge clk);
    chk(pulses == 2 && last_len == 25, $sformatf("retrigger ignored (n=%0d len=%0d)", pulses, last_len));
    // trigger held high for a long time
    @(negedge clk) trig = 1;
    repeat (100) @(negedge clk);
    trig = 0;
    repeat (10) @(posedge clk);
    chk(pulses == 3 && last_len == 25, $sformatf("held trigger one pulse (n=%0d len=%0d)", pulses, last_len));
    // periodic square wave at 500 kHz: one pulse per period
    for (int k = 0; k < 10; k++) begin
      @(negedge clk) trig = 1;
      repeat (25) @(negedge clk);
      trig = 0;
      repeat (24) @(negedge clk);
    end
    repeat (30) @(posedge clk);
    chk(pulses == 13 && last_len == 25, $sformatf("500 kHz train (n=%0d len=%0d)", pulses, last_len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
