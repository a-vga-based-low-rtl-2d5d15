// tb_trace_pixel: for every sample value and every row, blue is set only on
// row min(510 - 2*d, 479) and never while busy.
`timescale 1ns/1ps
module tb_trace_pixel;
  logic [7:0] data;
  logic [9:0] row;
  logic busy, blue;
  int checks = 0, failures = 0;
  int hits, target;

  trace_pixel dut (.data, .row, .busy, .blue);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++) begin
      data = 8'(d);
      target = 510 - 2 * d;
      if (target > 479) target = 479;
      hits = 0;
      for (int r = 0; r < 525; r++) begin
        row = 10'(r);
        busy = 0;
        #1;
        if (blue) hits++;
        checks++;
        if (blue != (r == target)) begin
          failures++;
          $display("FAIL d=%0d row=%0d blue=%b", d, r, blue);
        end
        busy = 1;
        #1;
        checks++;
        if (blue) failures++;
      end
      checks++;
      if (hits != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
