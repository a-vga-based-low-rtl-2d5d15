// tb_sample_counter: checks the clear value (all ones), counting of rising
// tick edges only, wrap-around and clear priority.
`timescale 1ns/1ps
module tb_sample_counter;
  logic clk = 0, rst_n = 0, clear = 0, tick = 0;
  logic [9:0] count;
  int checks = 0, failures = 0;

  sample_counter dut (.clk, .rst_n, .clear, .tick, .count);

  always #20 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic pulse_tick(int high);
    @(negedge clk) tick = 1;
    repeat (high) @(negedge clk);
    tick = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1 chk(count == 10'h3FF, "reset value all ones");
    pulse_tick(1);
    chk(count == 0, $sformatf("first edge gives 0, got %0d", count));
    pulse_tick(7);
    chk(count == 1, $sformatf("long-high tick counts once, got %0d", count));
    for (int k = 2; k < 700; k++) begin
      pulse_tick(1 + (k % 3));
      chk(count == 10'(k), $sformatf("count %0d got %0d", k, count));
    end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    chk(count == 10'h3FF, "clear gives all ones");
    @(negedge clk) begin clear = 1; tick = 1; end
    @(negedge clk) begin clear = 0; end
    @(negedge clk) tick = 0;
    chk(count == 10'h3FF, "clear wins over tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
