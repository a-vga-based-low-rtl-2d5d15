// tb_sampler10b: drives the frame controller with a simple counter model
// and checks: idle until a trigger edge, clock enable during the frame,
// disable when the count reaches SAMPLES-1, flush length, counter reset,
// and that a trigger during a frame is ignored. Uses SAMPLES=16,
// FLUSH_CYCLES=10.
`timescale 1ns/1ps
module tb_sampler10b;
  localparam int S = 16, FL = 10;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [9:0] sample_no;
  logic sample_clk_en, reset_counter, busy;
  int checks = 0, failures = 0;

  sampler10b #(.SAMPLES(S), .FLUSH_CYCLES(FL)) dut (
    .clk, .rst_n, .trigger, .sample_no, .sample_clk_en, .reset_counter, .busy);

  // counter model: one count every 4 enabled clocks
  int div = 0;
  always @(posedge clk) begin
    if (reset_counter) begin sample_no <= '1; div = 0; end
    else if (sample_clk_en) begin
      if (div == 0) sample_no <= sample_no + 1'b1;
      div = (div + 1) % 4;
    end
  end

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

  int en_cycles;
  time t0, t_end;
  initial begin
    sample_no = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    #1 chk(!sample_clk_en && reset_counter && !busy, "idle before trigger");
    for (int frame = 0; frame < 2; frame++) begin
      @(negedge clk) trigger = 1;
      en_cycles = 0;
      t0 = $time;
      // wait until enabled
      while (!sample_clk_en) @(posedge clk);
      #1 chk(busy && !reset_counter, "busy, counter free while running");
      // trigger still high a while, and a second edge during the frame
      repeat (5) @(negedge clk);
      trigger = 0;
      @(negedge clk) trigger = 1;
      @(negedge clk) trigger = 0;
      while (sample_clk_en) begin
        @(posedge clk); #1;
      end
      chk(sample_no == 10'(S - 1), $sformatf("disabled at last sample, count=%0d", sample_no));
      t_end = $time;
      while (busy) begin @(posedge clk); #1; end
      chk(($time - t_end) / 40 == FL, $sformatf("flush %0d clocks", ($time - t_end) / 40));
      chk(reset_counter, "counter reset at frame end");
      @(posedge clk); #1;
      chk(sample_no == 10'h3FF, "counter cleared");
      repeat (50) @(posedge clk);
      #1 chk(!busy && !sample_clk_en, "no new frame from the ignored trigger");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
